// ip_processor: IPv4 layer between the frame processor and the UDP
// processor.
//
// Ingress: frame words are written into a holding FIFO (IN_DEPTH words).
// While they are written, the header is checked: version 4, IHL >= 5 and
// the ones' complement sum of the IHL header words equal to 0xFFFF. When the
// last header word (or, for a short frame, the frame end) has been written,
// a keep/drop verdict is queued. The reader of the FIFO may not pass the
// first word of a packet before that packet's verdict is known; dropped
// packets are read out and discarded. On the way out of the FIFO the TTL is
// decremented when ttl_dec_en is set and the TTL is not zero, and the header
// checksum is patched incrementally (RFC 1624: HC' = ~(~HC + ~m + m')).
// sop marks word IHL, the first payload word. The ingress never stalls
// (its words arrive from cells that have already been accepted);
// lo_in_tca is hi_out_tca registered.
//
// Egress: packet words from above go through a second FIFO (OUT_DEPTH
// words). While they are written the header checksum of each packet is
// recomputed from its header words, with the checksum field taken as zero.
// The reader may not pass header word 2 of a packet before that packet's
// new checksum is known, and writes it into bits [15:0] of word 2. The
// reader moves one word per clock while lo_out_tca is high; hi_in_tca is
// high while the FIFO has OUT_SLACK free words.
//
// The checks, the optional TTL decrement, the start-of-payload signal and
// the checksum recomputation are the document's; the FIFO structure and
// sizes and the incremental TTL update are this design's choices. A TTL
// that reaches zero is not acted on (no ICMP).
module ip_processor
  import lpw_pkg::*;
#(
  parameter int IN_DEPTH  = 32,
  parameter int OUT_DEPTH = 32,
  parameter int OUT_SLACK = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      ttl_dec_en,
  // from / to the frame processor
  input  lpw_word_t lo_in,
  output logic      lo_in_tca,
  output lpw_word_t lo_out,
  input  logic      lo_out_tca,
  // to / from the upper layer
  output lpw_word_t hi_out,
  input  logic      hi_out_tca,
  input  lpw_word_t hi_in,
  output logic      hi_in_tca,
  // event strobes
  output logic      ip_ok,
  output logic      ip_drop
);
  localparam int IW = $clog2(IN_DEPTH);
  localparam int OW = $clog2(OUT_DEPTH);

  // =============================================================== ingress
  // write side: header check
  logic [3:0]  iw_idx;       // word index, saturating at 15
  logic [3:0]  iw_ihl;
  logic [3:0]  iw_ver;
  logic [31:0] iw_sum;
  logic        iw_done;      // verdict of the current packet queued
  logic        iv_push, iv_keep;
  logic [IW:0] if_count;
  logic        if_empty, if_full;

  wire [3:0]  iw_ihl_c = (lo_in.sof) ? lo_in.data[27:24] : iw_ihl;
  wire [3:0]  iw_ver_c = (lo_in.sof) ? lo_in.data[31:28] : iw_ver;
  wire [3:0]  iw_idx_c = (lo_in.sof) ? 4'd0 : iw_idx;
  wire [31:0] iw_sum_c = ((lo_in.sof) ? 32'd0 : iw_sum) + {16'd0, lo_in.data[31:16]}
                         + {16'd0, lo_in.data[15:0]};
  wire        iw_done_c = lo_in.sof ? 1'b0 : iw_done;
  wire        iw_hdr_end = iw_idx_c == iw_ihl_c - 4'd1;

  always_comb begin
    iv_push = 1'b0;
    iv_keep = 1'b0;
    if (lo_in.dataen && !iw_done_c) begin
      if (iw_ihl_c < 4'd5 || iw_ver_c != 4'd4) begin
        iv_push = 1'b1;                         // bad version or IHL: drop
      end else if (iw_hdr_end) begin
        iv_push = 1'b1;
        iv_keep = (oc_fold(iw_sum_c) == 16'hFFFF);
      end else if (lo_in.eof) begin
        iv_push = 1'b1;                         // frame shorter than header
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iw_idx <= '0; iw_ihl <= '0; iw_ver <= '0; iw_sum <= '0; iw_done <= 1'b0;
      lo_in_tca <= 1'b0;
    end else begin
      lo_in_tca <= hi_out_tca;
      if (lo_in.dataen) begin
        iw_ihl  <= iw_ihl_c;
        iw_ver  <= iw_ver_c;
        iw_sum  <= iw_sum_c;
        iw_idx  <= (iw_idx_c == 4'd15) ? 4'd15 : iw_idx_c + 4'd1;
        iw_done <= iw_done_c || iv_push;
      end
    end
  end

  lpw_word_t if_head;
  logic      if_pop;
  logic      iv_empty, iv_head;
  logic      iv_pop;

  sync_fifo #(.WIDTH($bits(lpw_word_t)), .DEPTH(IN_DEPTH)) u_in_fifo (
    .clk, .rst_n, .wr_en(lo_in.dataen), .wr_data(lo_in), .rd_en(if_pop),
    .rd_data(if_head), .count(if_count), .empty(if_empty), .full(if_full));
  sync_fifo #(.WIDTH(1), .DEPTH(8)) u_in_verdict (
    .clk, .rst_n, .wr_en(iv_push), .wr_data(iv_keep), .rd_en(iv_pop),
    .rd_data(iv_head), .count(), .empty(iv_empty), .full());

  // read side
  logic        ir_keep;
  logic [3:0]  ir_idx, ir_ihl;
  logic [15:0] ir_m, ir_m2;

  assign if_pop = !if_empty && !(if_head.sof && iv_empty);
  assign iv_pop = if_pop && if_head.sof;

  wire        ir_keep_c = if_head.sof ? iv_head : ir_keep;
  wire [3:0]  ir_idx_c  = if_head.sof ? 4'd0 : ir_idx;
  wire [3:0]  ir_ihl_c  = if_head.sof ? if_head.data[27:24] : ir_ihl;
  wire        ir_ttl_dec = ttl_dec_en && ir_idx_c == 4'd2 && if_head.data[31:24] != 8'd0;

  always_comb begin
    ir_m  = if_head.data[31:16];
    ir_m2 = {if_head.data[31:24] - 8'd1, if_head.data[23:16]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir_keep <= 1'b0; ir_idx <= '0; ir_ihl <= '0;
      hi_out <= '0; ip_ok <= 1'b0; ip_drop <= 1'b0;
    end else begin
      hi_out  <= '0;
      ip_ok   <= 1'b0;
      ip_drop <= 1'b0;
      if (if_pop) begin
        ir_keep <= ir_keep_c;
        ir_ihl  <= ir_ihl_c;
        ir_idx  <= (ir_idx_c == 4'd15) ? 4'd15 : ir_idx_c + 4'd1;
        if (if_head.sof) begin
          ip_ok   <= iv_head;
          ip_drop <= !iv_head;
        end
        if (ir_keep_c) begin
          hi_out        <= if_head;
          hi_out.dataen <= 1'b1;
          hi_out.sop    <= (ir_idx_c == ir_ihl_c);
          if (ir_ttl_dec) begin
            hi_out.data[31:24] <= ir_m2[15:8];
            hi_out.data[15:0]  <= ~oc_add(oc_add(~if_head.data[15:0], ~ir_m), ir_m2);
          end
        end
      end
    end
  end

  // ================================================================ egress
  logic [3:0]  ow_idx, ow_ihl;
  logic [31:0] ow_sum;
  logic        ow_done;
  logic        oc_push;
  logic [15:0] oc_val;
  logic [OW:0] of_count;
  logic        of_empty, of_full;

  wire [3:0]  ow_idx_c  = hi_in.sof ? 4'd0 : ow_idx;
  wire [3:0]  ow_ihl_c  = hi_in.sof ? hi_in.data[27:24] : ow_ihl;
  wire        ow_done_c = hi_in.sof ? 1'b0 : ow_done;
  wire [31:0] ow_sum_c  = (hi_in.sof ? 32'd0 : ow_sum) + {16'd0, hi_in.data[31:16]}
                          + ((ow_idx_c == 4'd2) ? 32'd0 : {16'd0, hi_in.data[15:0]});

  always_comb begin
    oc_push = hi_in.dataen && !ow_done_c &&
              (ow_idx_c == ow_ihl_c - 4'd1 || ow_ihl_c < 4'd5 || hi_in.eof);
    oc_val  = ~oc_fold(ow_sum_c);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ow_idx <= '0; ow_ihl <= '0; ow_sum <= '0; ow_done <= 1'b0;
    end else if (hi_in.dataen) begin
      ow_idx  <= (ow_idx_c == 4'd15) ? 4'd15 : ow_idx_c + 4'd1;
      ow_ihl  <= ow_ihl_c;
      ow_sum  <= ow_sum_c;
      ow_done <= ow_done_c || oc_push;
    end
  end

  lpw_word_t   of_head;
  logic        of_pop, oc_pop, oc_empty;
  logic [16:0] oc_head;    // {valid header, checksum}
  logic [3:0]  or_idx;
  wire  [3:0]  or_idx_c = of_head.sof ? 4'd0 : or_idx;
  // the word that takes the packet's checksum entry
  wire         or_needs = (or_idx_c == 4'd2) || (of_head.eof && or_idx_c < 4'd2);

  sync_fifo #(.WIDTH($bits(lpw_word_t)), .DEPTH(OUT_DEPTH)) u_out_fifo (
    .clk, .rst_n, .wr_en(hi_in.dataen), .wr_data(hi_in), .rd_en(of_pop),
    .rd_data(of_head), .count(of_count), .empty(of_empty), .full(of_full));
  sync_fifo #(.WIDTH(17), .DEPTH(8)) u_out_cksum (
    .clk, .rst_n, .wr_en(oc_push), .wr_data({ow_ihl_c >= 4'd5 && ow_idx_c == ow_ihl_c - 4'd1, oc_val}),
    .rd_en(oc_pop), .rd_data(oc_head), .count(), .empty(oc_empty), .full());

  assign of_pop    = !of_empty && lo_out_tca && !(or_needs && oc_empty);
  assign oc_pop    = of_pop && or_needs;
  assign hi_in_tca = (OUT_DEPTH - int'(of_count)) >= OUT_SLACK;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      or_idx <= '0;
      lo_out <= '0;
    end else begin
      lo_out <= '0;
      if (of_pop) begin
        or_idx <= (or_idx_c == 4'd15) ? 4'd15 : or_idx_c + 4'd1;
        lo_out <= of_head;
        lo_out.sop <= 1'b0;
        lo_out.sod <= 1'b0;
        lo_out.udp <= 1'b0;
        lo_out.be  <= '0;
        if (or_idx_c == 4'd2 && oc_head[16]) lo_out.data[15:0] <= oc_head[15:0];
      end
    end
  end

  a_out_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    hi_in.dataen |-> !of_full);
  a_in_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    lo_in.dataen |-> !if_full);
endmodule
