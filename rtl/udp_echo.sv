// udp_echo: the UDP application of the ROT13 example. It sends every UDP
// datagram back where it came from, with its payload ROT13-encrypted.
//
// Words from the UDP processor pass through a one-word holding register: a
// word leaves when the next word of the stream arrives, or on its own when
// it is the last word of a packet. This lets the source and destination
// addresses (packet words 3 and 4) trade places: when word 3 leaves, word 4
// is the word arriving, and word 3 is kept to go out in place of word 4. In
// the UDP header word (word IHL, marked by sop) the source and destination
// ports trade places. Every payload byte (be) goes through one of four
// ROT13 entities, one per byte lane. Only packets the UDP layer marked as
// UDP are changed; others pass unchanged. The UDP processor recomputes the
// UDP checksum and the IP processor the header checksum of what leaves here.
// in_tca is out_tca: the application never holds data back. Words arrive
// in the byte order of the application interface (first byte in bits
// [7:0]); swapping the 16-bit halves of the UDP header word swaps the ports
// in either byte order, and ROT13 works per byte lane, so nothing here
// depends on it.
//
// The four ROT13 entities behind a UDP echo entity follow the document's
// figure; that the echo entity swaps addresses and ports is this design's
// reading of its name.
module udp_echo
  import lpw_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  lpw_word_t in,
  output logic      in_tca,
  output lpw_word_t out,
  input  logic      out_tca
);
  lpw_word_t   held;
  logic [3:0]  held_idx;      // word index of the held word (saturates at 15)
  logic [3:0]  idx;           // word index of the arriving word
  logic [31:0] saved3;        // word 3, to be sent as word 4
  logic [31:0] rot;
  logic        emit;
  logic [31:0] emit_data;

  assign in_tca = out_tca;
  assign idx    = in.sof ? 4'd0 : ((held_idx == 4'd15) ? 4'd15 : held_idx + 4'd1);
  assign emit   = held.dataen && (in.dataen || held.eof);

  for (genvar g = 0; g < 4; g++) begin : g_rot
    rot13 u_rot (.in_byte(held.data[8*g +: 8]), .out_byte(rot[8*g +: 8]));
  end

  always_comb begin
    emit_data = held.data;
    if (held.udp) begin
      if (held_idx == 4'd3)      emit_data = in.data;
      else if (held_idx == 4'd4) emit_data = saved3;
      else if (held.sop)         emit_data = {held.data[15:0], held.data[31:16]};
      else begin
        for (int b = 0; b < 4; b++)
          if (held.be[b]) emit_data[8*b +: 8] = rot[8*b +: 8];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held     <= '0;
      held_idx <= '0;
      saved3   <= '0;
      out      <= '0;
    end else begin
      out <= '0;
      if (emit) begin
        out      <= held;
        out.data <= emit_data;
        if (held_idx == 4'd3) saved3 <= held.data;
      end
      if (in.dataen) begin
        held     <= in;
        held_idx <= idx;
      end else if (emit) begin
        held.dataen <= 1'b0;
      end
    end
  end

  // The word after address word 3 of a UDP packet is word 4 of that packet.
  a_word4_follows: assert property (@(posedge clk) disable iff (!rst_n)
    (emit && held.udp && held_idx == 4'd3) |-> (in.dataen && !in.sof));
endmodule
