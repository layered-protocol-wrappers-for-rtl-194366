// cell_processor: the lowest wrapper layer. It sits on the 32-bit cell
// interface of the network module and handles ATM cells and flows.
//
// Ingress: cells enter as 14 consecutive words, word 0 marked by in_soc.
// A three-stage input pipeline holds the header until the HEC word has
// arrived; "HEC check" then compares the received HEC (bits [31:24] of word
// 1) with the CRC-8 of the header and drops the whole cell on a mismatch.
// "Dispatch" sends the cell, still 14 words long, on by its VCI:
//   VCI == CTRL_VCI -> control-cell unit (never forwarded),
//   VCI == app_vci  -> upper layer (the frame processor) on app_out,
//   any other VCI   -> bypass queue, i.e. straight back out.
// Control cells carry a command in payload word 0: opcode in [31:24],
// register address in [7:0], write data in payload word 1. Opcode 1 writes
// register 0 (application VCI, [15:0]) or register 1 (control flags, [7:0];
// bit 0 enables the IP TTL decrement). Every control cell is answered on
// the same header with a status cell: the command with bit 31 set, both
// registers and the cell counters (cells in, HEC drops, application,
// bypass, control). An answer is dropped if the control queue has no room.
//
// Egress: three queues (application, bypass, control) each hold whole
// cells; the output multiplexer serves them round robin, a cell at a time,
// starting a cell only while out_tca is high and sending it without a gap.
// "HEC set" recomputes the HEC of every outgoing cell.
//
// Flow control: in_tca (towards the sender) is high while the upper layer
// accepts data and the bypass queue has room for BYP_SLACK more words;
// the sender is expected to finish the current cell and then wait.
// app_in_tca is high while the application queue can take one more cell.
// Latency: ingress 3 clocks from in_data to app_out; egress 2 clocks from
// the start decision to out_data.
//
// The layering, the three queues, HEC check/dispatch/control/HEC set follow
// the document's data-flow figure; the control-cell format, the VCI values,
// queue depths and the round-robin policy are this design's own choices.
module cell_processor
  import lpw_pkg::*;
#(
  parameter logic [15:0] CTRL_VCI    = 16'h0023,
  parameter logic [15:0] APP_VCI_RST = 16'h0032,
  parameter int          QDEPTH      = 64,
  parameter int          CTRL_QDEPTH = 32,
  parameter int          BYP_SLACK   = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  // cell interface towards the network (lower side)
  input  logic [31:0] in_data,
  input  logic        in_soc,
  output logic        in_tca,
  output logic [31:0] out_data,
  output logic        out_soc,
  input  logic        out_tca,
  // cells to and from the upper layer
  output cell_word_t  app_out,
  input  logic        app_out_tca,
  input  cell_word_t  app_in,
  output logic        app_in_tca,
  // control registers
  output logic [15:0] app_vci,
  output logic [7:0]  ctrl_flags,
  // event strobes
  output logic        ev_hec_drop,
  output logic        ev_app,
  output logic        ev_bypass,
  output logic        ev_ctrl
);
  localparam int QW = $clog2(QDEPTH);
  localparam int CW = $clog2(CTRL_QDEPTH);

  typedef enum logic [1:0] {D_DROP, D_APP, D_BYP, D_CTRL} dest_e;

  typedef struct packed {
    logic [31:0] data;
    logic [3:0]  idx;
    logic        valid;
  } stage_t;

  // ---------------------------------------------------------------- ingress
  logic [3:0] in_idx;
  logic       in_active;
  stage_t     s1, s2, s3;
  dest_e      dest_d, dest_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_idx    <= '0;
      in_active <= 1'b0;
    end else if (in_soc) begin
      in_idx    <= 4'd1;
      in_active <= 1'b1;
    end else if (in_active) begin
      in_idx    <= in_idx + 4'd1;
      in_active <= (in_idx != 4'(CELL_WORDS - 1));
    end
  end

  // Decision when word 1 is in s1 and the header in s2.
  always_comb begin
    dest_d = dest_q;
    if (s1.valid && s1.idx == 4'd1) begin
      if (hec8(s2.data) != s1.data[31:24]) dest_d = D_DROP;
      else if (hdr_vci(s2.data) == CTRL_VCI) dest_d = D_CTRL;
      else if (hdr_vci(s2.data) == app_vci)  dest_d = D_APP;
      else dest_d = D_BYP;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0;
      s2 <= '0;
      s3 <= '0;
      dest_q <= D_DROP;
    end else begin
      s1.data  <= in_data;
      s1.idx   <= in_soc ? 4'd0 : in_idx;
      s1.valid <= in_soc || in_active;
      s2 <= s1;
      s3 <= s2;
      dest_q <= dest_d;
    end
  end

  wire hdr_at_s3 = s3.valid && s3.idx == 4'd0;
  assign ev_hec_drop = hdr_at_s3 && dest_q == D_DROP;
  assign ev_app      = hdr_at_s3 && dest_q == D_APP;
  assign ev_bypass   = hdr_at_s3 && dest_q == D_BYP;
  assign ev_ctrl     = hdr_at_s3 && dest_q == D_CTRL;

  always_comb begin
    app_out.data  = s3.data;
    app_out.soc   = hdr_at_s3;
    app_out.valid = s3.valid && dest_q == D_APP;
  end

  // ------------------------------------------------------- control cells
  logic [31:0] cnt_in, cnt_hec, cnt_app, cnt_byp, cnt_ctrl;
  logic [31:0] c_hdr, c_cmd, c_wdata;
  logic [31:0] r_hdr, r_cmd;   // header and command of the cell being answered
  logic        resp_busy;
  logic [3:0]  resp_idx;
  logic [31:0] resp_word;
  logic [CW:0] cq_count;
  logic        cq_wr;
  wire         ctrl_end = s3.valid && dest_q == D_CTRL && s3.idx == 4'(CELL_WORDS - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_in <= '0; cnt_hec <= '0; cnt_app <= '0; cnt_byp <= '0; cnt_ctrl <= '0;
      c_hdr <= '0; c_cmd <= '0; c_wdata <= '0; r_hdr <= '0; r_cmd <= '0;
      app_vci    <= APP_VCI_RST;
      ctrl_flags <= 8'h00;
      resp_busy  <= 1'b0;
      resp_idx   <= '0;
    end else begin
      if (hdr_at_s3)   cnt_in   <= cnt_in + 1;
      if (ev_hec_drop) cnt_hec  <= cnt_hec + 1;
      if (ev_app)      cnt_app  <= cnt_app + 1;
      if (ev_bypass)   cnt_byp  <= cnt_byp + 1;
      if (ev_ctrl)     cnt_ctrl <= cnt_ctrl + 1;
      if (s3.valid && dest_q == D_CTRL) begin
        if (s3.idx == 4'd0) c_hdr   <= s3.data;
        if (s3.idx == 4'd2) c_cmd   <= s3.data;
        if (s3.idx == 4'd3) c_wdata <= s3.data;
      end
      if (ctrl_end) begin
        if (c_cmd[31:24] == 8'h01) begin
          if (c_cmd[7:0] == 8'd0) app_vci    <= c_wdata[15:0];
          if (c_cmd[7:0] == 8'd1) ctrl_flags <= c_wdata[7:0];
        end
        // Answer only if the whole status cell fits in the control queue.
        if ((!resp_busy || resp_idx == 4'(CELL_WORDS - 1)) &&
            (CTRL_QDEPTH - int'(cq_count)) >= CELL_WORDS + (resp_busy ? 1 : 0)) begin
          resp_busy <= 1'b1;
          resp_idx  <= '0;
          r_hdr     <= c_hdr;
          r_cmd     <= c_cmd;
        end else if (resp_busy) begin
          resp_idx <= resp_idx + 4'd1;
          if (resp_idx == 4'(CELL_WORDS - 1)) resp_busy <= 1'b0;
        end
      end else if (resp_busy) begin
        resp_idx <= resp_idx + 4'd1;
        if (resp_idx == 4'(CELL_WORDS - 1)) resp_busy <= 1'b0;
      end
    end
  end

  always_comb begin
    case (resp_idx)
      4'd0:    resp_word = r_hdr & 32'hFFFF_FFF1;  // PTI cleared
      4'd1:    resp_word = 32'h0;                  // HEC set on the way out
      4'd2:    resp_word = r_cmd | 32'h8000_0000;
      4'd3:    resp_word = {16'h0, app_vci};
      4'd4:    resp_word = {24'h0, ctrl_flags};
      4'd5:    resp_word = cnt_in;
      4'd6:    resp_word = cnt_hec;
      4'd7:    resp_word = cnt_app;
      4'd8:    resp_word = cnt_byp;
      4'd9:    resp_word = cnt_ctrl;
      default: resp_word = 32'h0;
    endcase
  end
  assign cq_wr = resp_busy;

  // -------------------------------------------------------------- queues
  localparam int NQ = 3;  // 0 application, 1 bypass, 2 control
  logic [NQ-1:0]  q_wr, q_rd, q_empty, q_full;
  logic [32:0]    q_wdata [NQ];
  logic [32:0]    q_rdata [NQ];
  logic [QW:0]    aq_count, bq_count;

  assign q_wr[0]    = app_in.valid;
  assign q_wdata[0] = {app_in.data, app_in.soc};
  assign q_wr[1]    = s3.valid && dest_q == D_BYP;
  assign q_wdata[1] = {s3.data, hdr_at_s3};
  assign q_wr[2]    = cq_wr;
  assign q_wdata[2] = {resp_word, resp_idx == 4'd0};

  sync_fifo #(.WIDTH(33), .DEPTH(QDEPTH)) u_app_q (
    .clk, .rst_n, .wr_en(q_wr[0]), .wr_data(q_wdata[0]), .rd_en(q_rd[0]),
    .rd_data(q_rdata[0]), .count(aq_count), .empty(q_empty[0]), .full(q_full[0]));
  sync_fifo #(.WIDTH(33), .DEPTH(QDEPTH)) u_byp_q (
    .clk, .rst_n, .wr_en(q_wr[1]), .wr_data(q_wdata[1]), .rd_en(q_rd[1]),
    .rd_data(q_rdata[1]), .count(bq_count), .empty(q_empty[1]), .full(q_full[1]));
  sync_fifo #(.WIDTH(33), .DEPTH(CTRL_QDEPTH)) u_ctrl_q (
    .clk, .rst_n, .wr_en(q_wr[2]), .wr_data(q_wdata[2]), .rd_en(q_rd[2]),
    .rd_data(q_rdata[2]), .count(cq_count), .empty(q_empty[2]), .full(q_full[2]));

  assign app_in_tca = (QDEPTH - int'(aq_count)) >= CELL_WORDS;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) in_tca <= 1'b0;
    else        in_tca <= app_out_tca && ((QDEPTH - int'(bq_count)) >= BYP_SLACK);
  end

  // ------------------------------------------------- output multiplexer
  logic          m_busy;
  logic [1:0]    m_sel, m_last;
  logic [3:0]    m_idx;
  logic [NQ-1:0] q_ready;
  logic          m_start;
  logic [1:0]    m_next;
  int            qcnt [NQ];

  always_comb begin
    qcnt[0] = int'(aq_count);
    qcnt[1] = int'(bq_count);
    qcnt[2] = int'(cq_count);
    for (int i = 0; i < NQ; i++) begin
      // words left after this cycle's read
      q_ready[i] = (qcnt[i] - ((m_busy && m_sel == 2'(i)) ? 1 : 0)) >= CELL_WORDS;
    end
    m_start = (!m_busy || m_idx == 4'(CELL_WORDS - 1)) && out_tca && (q_ready != '0);
    // round robin: first ready queue after the last one served
    m_next = m_last;
    for (int k = 3; k >= 1; k--) begin
      int j;
      j = (int'(m_last) + k) % NQ;
      if (q_ready[j]) m_next = 2'(j);
    end
    q_rd = '0;
    if (m_busy) q_rd[m_sel] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_busy <= 1'b0;
      m_sel  <= 2'd0;
      m_last <= 2'd2;
      m_idx  <= '0;
    end else if (m_start) begin
      m_busy <= 1'b1;
      m_sel  <= m_next;
      m_last <= m_next;
      m_idx  <= '0;
    end else if (m_busy) begin
      m_idx <= m_idx + 4'd1;
      if (m_idx == 4'(CELL_WORDS - 1)) m_busy <= 1'b0;
    end
  end

  // ------------------------------------------------------------ HEC set
  logic [31:0] h_hdr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_data <= '0;
      out_soc  <= 1'b0;
      h_hdr    <= '0;
    end else if (m_busy) begin
      out_soc <= (m_idx == 4'd0);
      if (m_idx == 4'd0) h_hdr <= q_rdata[m_sel][32:1];
      if (m_idx == 4'd1) out_data <= {hec8(h_hdr), 24'h0};
      else               out_data <= q_rdata[m_sel][32:1];
    end else begin
      out_data <= '0;
      out_soc  <= 1'b0;
    end
  end

  // Cells are written to the queues whole and read whole: the head of a
  // queue being read is always the start of a cell.
  a_soc_at_head: assert property (@(posedge clk) disable iff (!rst_n)
    (m_busy && m_idx == 4'd0) |-> q_rdata[m_sel][0]);
endmodule
