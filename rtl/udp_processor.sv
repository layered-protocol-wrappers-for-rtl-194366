// udp_processor: UDP layer between the IP processor and the application.
//
// Ingress: IP packet words pass up with one clock of delay. A udp_cksum
// instance finds the protocol, the datagram bounds and the checksum. Words
// of a packet with protocol 17 carry udp (from word 2 on), the payload bytes
// are flagged in be, and sod marks the first payload word (start of
// datagram). Packets of other protocols pass up unmarked and count as
// non_udp. At the end of a UDP packet udp_ok pulses if the received checksum
// is zero (not used) or equal to the computed one, udp_bad otherwise. The
// datagram is passed up either way: a verdict at the end of the packet can
// only be reported, not acted on, without buffering the whole datagram.
// lo_in_tca is hi_out_tca registered.
//
// Byte order: towards the IP processor words are in network order (first
// byte in bits [31:24]); at the application interface (hi_out, hi_in) the
// bytes of every word are reversed, first byte in bits [7:0], and be[k]
// flags the byte in bits [8k+7:8k]. This follows the application-interface
// waveforms of the document, where 'Hell' is the word 6C6C6548.
//
// Egress: the UDP checksum sits in the datagram header, in front of the data
// it covers, so outgoing packets are stored whole in a packet buffer of
// PKT_DEPTH words. A second udp_cksum instance computes the checksum as the
// packet is written; at the end of the packet its write is committed and
// {is_udp, IHL, checksum} is queued. The reader starts a packet only once it
// is committed and then writes the checksum into bits [15:0] of word IHL+1
// of UDP packets. It moves one word per clock while lo_out_tca is high. A
// packet longer than PKT_DEPTH-PKT_SLACK words is discarded (udp_ovf) by
// rolling the write pointer back. hi_in_tca is high while the buffer has PKT_SLACK
// free words and the result queue has room.
//
// The protocol check, the start-of-datagram signal and checksum check and
// generation are the document's; the store-and-forward buffer, its size and
// the handling of bad or foreign packets are this design's choices.
module udp_processor
  import lpw_pkg::*;
#(
  parameter int PKT_DEPTH = 1024,
  parameter int PKT_SLACK = 96,
  parameter int RES_DEPTH = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  // from / to the IP processor
  input  lpw_word_t lo_in,
  output logic      lo_in_tca,
  output lpw_word_t lo_out,
  input  logic      lo_out_tca,
  // to / from the application
  output lpw_word_t hi_out,
  input  logic      hi_out_tca,
  input  lpw_word_t hi_in,
  output logic      hi_in_tca,
  // event strobes
  output logic      udp_ok,
  output logic      udp_bad,
  output logic      non_udp,
  output logic      udp_ovf
);
  localparam int AW = $clog2(PKT_DEPTH);
  localparam int RW = $clog2(RES_DEPTH);

  // =============================================================== ingress
  logic [13:0] i_idx;
  logic        i_udp, i_first, i_cword;
  logic [3:0]  i_ihl, i_be;
  logic [15:0] i_calc, i_rx;

  udp_cksum u_in_cks (
    .clk, .rst_n, .in(lo_in), .idx(i_idx), .is_udp(i_udp), .ihl(i_ihl),
    .pld_be(i_be), .first_pld(i_first), .cks_word(i_cword),
    .cks_calc(i_calc), .cks_rx(i_rx));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hi_out <= '0; udp_ok <= 1'b0; udp_bad <= 1'b0; non_udp <= 1'b0;
      lo_in_tca <= 1'b0;
    end else begin
      lo_in_tca <= hi_out_tca;
      hi_out  <= '0;
      udp_ok  <= 1'b0;
      udp_bad <= 1'b0;
      non_udp <= 1'b0;
      if (lo_in.dataen) begin
        hi_out      <= lo_in;
        hi_out.data <= bswap32(lo_in.data);
        hi_out.udp  <= i_udp && i_idx >= 14'd2;
        hi_out.sod  <= i_first;
        hi_out.be   <= rev4(i_be);
        if (lo_in.eof) begin
          udp_ok  <= i_udp && (i_rx == 16'h0 || i_rx == i_calc);
          udp_bad <= i_udp && !(i_rx == 16'h0 || i_rx == i_calc);
          non_udp <= !i_udp;
        end
      end
    end
  end

  // ================================================================ egress
  lpw_word_t hi_in_n;                  // hi_in in network byte order
  always_comb begin
    hi_in_n      = hi_in;
    hi_in_n.data = bswap32(hi_in.data);
  end

  logic [13:0] e_idx;
  logic        e_udp, e_first, e_cword;
  logic [3:0]  e_ihl, e_be;
  logic [15:0] e_calc, e_rx;

  udp_cksum u_out_cks (
    .clk, .rst_n, .in(hi_in_n), .idx(e_idx), .is_udp(e_udp), .ihl(e_ihl),
    .pld_be(e_be), .first_pld(e_first), .cks_word(e_cword),
    .cks_calc(e_calc), .cks_rx(e_rx));

  logic [33:0] pb_mem [PKT_DEPTH];     // {data, sof, eof}
  logic [AW:0] pb_wr, pb_commit, pb_rd;
  logic        pb_ovf;                 // discarding the rest of a packet
  logic [AW:0] pb_used;
  logic        pb_full;

  assign pb_used = pb_wr - pb_rd;
  assign pb_full = pb_used == (AW+1)'(PKT_DEPTH);

  wire ovf_cur  = pb_ovf && !hi_in.sof;   // a new packet ends a discard
  // A packet longer than PKT_DEPTH-PKT_SLACK words could never be completed
  // (hi_in_tca would stop its sender first), so it is discarded.
  wire [AW:0] pb_pending = pb_wr - pb_commit;   // words of the packet being written
  wire too_long = pb_full || (int'(pb_pending) >= PKT_DEPTH - PKT_SLACK);
  wire do_write = hi_in.dataen && !ovf_cur && !too_long;
  wire ovf_now  = hi_in.dataen && !ovf_cur && too_long;
  wire commit   = do_write && hi_in.eof;

  logic [20:0] res_head;               // {udp, ihl, checksum}
  logic        res_pop, res_empty, res_full;
  logic [RW:0] res_count;

  sync_fifo #(.WIDTH(21), .DEPTH(RES_DEPTH)) u_res (
    .clk, .rst_n, .wr_en(commit), .wr_data({e_udp, e_ihl, e_calc}), .rd_en(res_pop),
    .rd_data(res_head), .count(res_count), .empty(res_empty), .full(res_full));

  always_ff @(posedge clk) begin
    if (do_write) pb_mem[pb_wr[AW-1:0]] <= {hi_in_n.data, hi_in.sof, hi_in.eof};
  end

  logic        r_busy;
  logic [13:0] r_idx;
  wire  [33:0] r_word = pb_mem[pb_rd[AW-1:0]];
  wire         r_go   = r_busy && lo_out_tca;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pb_wr <= '0; pb_commit <= '0; pb_rd <= '0; pb_ovf <= 1'b0;
      udp_ovf <= 1'b0;
      r_busy <= 1'b0; r_idx <= '0;
      lo_out <= '0;
      hi_in_tca <= 1'b0;
    end else begin
      hi_in_tca <= ((PKT_DEPTH - int'(pb_used)) >= PKT_SLACK) &&
                   ((RES_DEPTH - int'(res_count)) > 4);
      udp_ovf <= 1'b0;
      // write side
      if (hi_in.dataen && hi_in.sof) pb_ovf <= 1'b0;
      if (do_write) begin
        pb_wr <= pb_wr + 1'b1;
        if (hi_in.eof) pb_commit <= pb_wr + 1'b1;
      end
      if (ovf_now) begin
        pb_wr   <= pb_commit;
        pb_ovf  <= !hi_in.eof;
        udp_ovf <= 1'b1;
      end
      // read side
      lo_out <= '0;
      if (!r_busy && !res_empty) begin
        r_busy <= 1'b1;
        r_idx  <= '0;
      end
      if (r_go) begin
        pb_rd <= pb_rd + 1'b1;
        r_idx <= r_idx + 14'd1;
        lo_out.data   <= r_word[33:2];
        lo_out.dataen <= 1'b1;
        lo_out.sof    <= r_word[1];
        lo_out.eof    <= r_word[0];
        if (res_head[20] && r_idx == {10'd0, res_head[19:16]} + 14'd1)
          lo_out.data[15:0] <= res_head[15:0];
        if (r_word[0]) r_busy <= 1'b0;
      end
    end
  end
  assign res_pop = r_go && r_word[0];

  a_res_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(commit && res_full));
  a_read_committed: assert property (@(posedge clk) disable iff (!rst_n) r_go |-> pb_rd != pb_commit);
endmodule
