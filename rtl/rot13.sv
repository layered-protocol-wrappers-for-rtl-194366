// rot13: one ROT13 entity. Rotates an ASCII letter by 13 places within its
// case ('A'..'M' <-> 'N'..'Z', 'a'..'m' <-> 'n'..'z') and leaves every other
// byte unchanged. Applying it twice gives the original byte, so the same
// entity encrypts and decrypts. Purely combinational, one byte wide; the
// application uses four of them side by side on a 32-bit word. The function
// is the document's; the byte-wide combinational form is this design's.
module rot13 (
  input  logic [7:0] in_byte,
  output logic [7:0] out_byte
);
  always_comb begin
    out_byte = in_byte;
    if ((in_byte >= 8'h41 && in_byte <= 8'h4D) || (in_byte >= 8'h61 && in_byte <= 8'h6D))
      out_byte = in_byte + 8'd13;       // A..M, a..m
    else if ((in_byte >= 8'h4E && in_byte <= 8'h5A) || (in_byte >= 8'h6E && in_byte <= 8'h7A))
      out_byte = in_byte - 8'd13;       // N..Z, n..z
  end
endmodule
