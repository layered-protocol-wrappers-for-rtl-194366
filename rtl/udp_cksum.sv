// udp_cksum: watches a stream of IP packet words and works out where the UDP
// datagram lies in it and what its checksum should be. Used by the UDP
// processor on both its ingress and its egress path.
//
// From word 0 it takes the IHL, from word 2 the protocol (17 = UDP), and from
// UDP header word 1 (packet word IHL+1) the UDP length. It sums, as a
// ones' complement sum, the pseudo header (source and destination address,
// protocol, UDP length), the UDP header with the checksum field taken as
// zero, and the UDP payload, masking the bytes that lie beyond the UDP
// length (frame padding and the AAL5 trailer). All outputs describe the word
// currently on `in` and are combinational from it and the state kept from
// earlier words of the packet:
//   idx       word index in the packet (saturates at 16383)
//   is_udp    protocol is 17 (valid from word 2 on)
//   ihl       header length in words
//   pld_be    bytes of this word that are UDP payload bytes
//   first_pld this word holds the first UDP payload byte
//   cks_word  this word is UDP header word 1 (length | checksum)
//   cks_calc  the checksum the datagram should carry, counting all words up
//             to and including this one (valid on the eof word); 0 maps to
//             0xFFFF
//   cks_rx    checksum field as received (valid after cks_word)
// Fragmented IP packets are not handled: every packet is taken to hold a
// whole datagram.
module udp_cksum
  import lpw_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  lpw_word_t   in,
  output logic [13:0] idx,
  output logic        is_udp,
  output logic [3:0]  ihl,
  output logic [3:0]  pld_be,
  output logic        first_pld,
  output logic        cks_word,
  output logic [15:0] cks_calc,
  output logic [15:0] cks_rx
);
  logic [13:0] idx_q;
  logic [3:0]  ihl_q;
  logic        udp_q;
  logic [15:0] len_q;     // UDP length in bytes
  logic        len_ok_q;  // length known
  logic [31:0] sum_q;
  logic [15:0] rx_q;

  logic [15:0] len_c;
  logic        len_ok_c;
  logic [31:0] add;
  logic [17:0] end_byte;  // first byte offset past the datagram
  logic [17:0] pld_byte;  // first payload byte offset

  always_comb begin
    idx    = in.sof ? 14'd0 : idx_q;
    ihl    = in.sof ? in.data[27:24] : ihl_q;
    is_udp = (idx == 14'd2) ? (in.data[23:16] == 8'd17) : (!in.sof && udp_q);
    cks_word = (idx == {10'd0, ihl} + 14'd1);
    len_c    = cks_word ? in.data[31:16] : len_q;
    len_ok_c = cks_word ? 1'b1 : (in.sof ? 1'b0 : len_ok_q);
    end_byte = {12'd0, ihl, 2'b00} + {2'd0, len_c};
    pld_byte = {12'd0, ihl, 2'b00} + 18'd8;
    cks_rx   = cks_word ? in.data[15:0] : rx_q;

    pld_be = '0;
    for (int j = 0; j < 4; j++) begin
      logic [17:0] b;
      b = {2'd0, idx, 2'(j)};
      pld_be[3-j] = is_udp && len_ok_c && idx > {10'd0, ihl} + 14'd1 &&
                    b >= pld_byte && b < end_byte;
    end
    first_pld = is_udp && len_ok_c && idx == {10'd0, ihl} + 14'd2 && len_c > 16'd8;

    // contribution of this word to the sum
    add = 32'd0;
    if (idx == 14'd3 || idx == 14'd4) begin
      add = {16'd0, in.data[31:16]} + {16'd0, in.data[15:0]};     // addresses
    end else if (idx == {10'd0, ihl}) begin
      add = {16'd0, in.data[31:16]} + {16'd0, in.data[15:0]};     // ports
    end else if (cks_word) begin
      add = {16'd0, in.data[31:16]} + {16'd0, in.data[31:16]} + 32'd17; // length twice, protocol
    end else if (pld_be != '0) begin
      add = {16'd0, in.data[31:24] & {8{pld_be[3]}}, in.data[23:16] & {8{pld_be[2]}}}
          + {16'd0, in.data[15:8]  & {8{pld_be[1]}}, in.data[7:0]   & {8{pld_be[0]}}};
    end
    cks_calc = ~oc_fold((in.sof ? 32'd0 : sum_q) + add);
    if (cks_calc == 16'h0000) cks_calc = 16'hFFFF;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx_q <= '0; ihl_q <= '0; udp_q <= 1'b0; len_q <= '0; len_ok_q <= 1'b0;
      sum_q <= '0; rx_q <= '0;
    end else if (in.dataen) begin
      idx_q    <= (idx == 14'd16383) ? idx : idx + 14'd1;
      ihl_q    <= ihl;
      udp_q    <= is_udp;
      len_q    <= len_c;
      len_ok_q <= len_ok_c;
      sum_q    <= (in.sof ? 32'd0 : sum_q) + add;
      rx_q     <= cks_rx;
    end
  end
endmodule
