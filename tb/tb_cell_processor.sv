// tb_cell_processor: drives the cell processor with application, bypass,
// control and bad-HEC cells. The upper layer is a loopback that returns each
// application cell one clock later with its HEC word cleared. Checks that
// every cell leaves with a correct HEC; that application and bypass cells
// come back unchanged and in order within their flow, bad-HEC cells never;
// that control cells write the registers and are answered with the
// counters; that nothing leaves while out_tca is low and the sender is
// stopped when the bypass queue fills; and the bypass latency on an idle
// processor: 20 clocks from the edge that drives the input header word to
// the edge where the output header word is first seen.
module tb_cell_processor;
  import lpw_pkg::*;
  import lpw_tb_pkg::*;

  localparam logic [15:0] APP  = 16'h0032;
  localparam logic [15:0] CTRL = 16'h0023;
  localparam logic [15:0] BYP  = 16'h0099;
  localparam int BYPASS_LATENCY = 20;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [31:0] in_data = '0, out_data;
  logic        in_soc = 1'b0, in_tca, out_soc, out_tca = 1'b1;
  cell_word_t  app_out, app_in;
  logic        app_in_tca;
  logic [15:0] app_vci;
  logic [7:0]  ctrl_flags;
  logic        ev_hec_drop, ev_app, ev_bypass, ev_ctrl;
  int checks = 0, failures = 0, cycle = 0;

  cell_processor dut (
    .clk, .rst_n, .in_data, .in_soc, .in_tca, .out_data, .out_soc, .out_tca,
    .app_out, .app_out_tca(1'b1), .app_in, .app_in_tca, .app_vci, .ctrl_flags,
    .ev_hec_drop, .ev_app, .ev_bypass, .ev_ctrl);

  // loopback upper layer
  always_ff @(posedge clk) begin
    app_in <= app_out;
    if (app_out.valid && !app_out.soc && app_in.soc) app_in.data <= 32'h0;
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  function automatic words_t mk_cell(input logic [15:0] vci, input int seed, input bit bad_hec);
    words_t w;
    logic [31:0] h;
    h = make_hdr(vci, 1'b1);
    w.push_back(h);
    w.push_back({ref_hec(h) ^ (bad_hec ? 8'h10 : 8'h00), 24'h0});
    w.push_back(32'(seed));
    for (int k = 1; k < 12; k++) w.push_back($urandom);
    return w;
  endfunction

  function automatic words_t ctrl(input logic [7:0] op, input logic [7:0] addr, input logic [31:0] d);
    words_t w;
    logic [31:0] h;
    h = make_hdr(CTRL, 1'b0);
    w.push_back(h);
    w.push_back({ref_hec(h), 24'h0});
    w.push_back({op, 16'h0, addr});
    w.push_back(d);
    for (int k = 0; k < 10; k++) w.push_back(32'h0);
    return w;
  endfunction

  words_t exp_q[logic [15:0]][$];   // per flow: order is kept within a flow only
  words_t rx_ctrl[$];
  int     t_in, t_out_first = -1;

  task automatic send(input words_t w);
    while (!in_tca) @(posedge clk);
    for (int k = 0; k < 14; k++) begin
      in_data <= w[k];
      in_soc  <= (k == 0);
      @(posedge clk);
    end
  endtask

  task automatic expect_cell(input words_t w);
    w[1] = {ref_hec(w[0]), 24'h0};
    exp_q[w[0][19:4]].push_back(w);
  endtask

  words_t cur;
  int n_out = 0, n_out_while_low = 0;
  always @(posedge clk) if (rst_n) begin
    if (out_soc && t_out_first < 0) t_out_first = cycle;
    if (out_soc && !out_tca) n_out_while_low++;
    if (out_soc || cur.size() != 0) begin
      cur.push_back(out_data);
      if (cur.size() == 14) begin
        n_out++;
        check(cur[1] == {ref_hec(cur[0]), 24'h0}, "HEC set");
        if (cur[0][19:4] == CTRL) rx_ctrl.push_back(cur);
        else begin
          words_t e;
          check(exp_q[cur[0][19:4]].size() != 0, "unexpected cell");
          if (exp_q[cur[0][19:4]].size() != 0) begin
            e = exp_q[cur[0][19:4]].pop_front();
            for (int k = 0; k < 14; k++)
              check(cur[k] == e[k], $sformatf("cell word %0d: %08h expected %08h", k, cur[k], e[k]));
          end
        end
        cur = {};
      end
    end
  end

  int n_hec, n_app, n_byp, n_ctl, n_bad_sent = 2;
  always @(posedge clk) if (rst_n) begin
    n_hec += int'(ev_hec_drop);
    n_app += int'(ev_app);
    n_byp += int'(ev_bypass);
    n_ctl += int'(ev_ctrl);
  end

  initial begin
    words_t w, r;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (3) @(posedge clk);
    check(app_vci == APP && ctrl_flags == 8'h0, "register reset values");

    // bypass latency on an idle processor
    w = mk_cell(BYP, 1, 1'b0);
    expect_cell(w);
    t_in = cycle;
    send(w);
    in_soc <= 1'b0;
    repeat (40) @(posedge clk);
    check(t_out_first - t_in == BYPASS_LATENCY,
          $sformatf("bypass latency %0d clocks", t_out_first - t_in));

    // a mix, back to back
    w = mk_cell(APP, 2, 1'b0); expect_cell(w); send(w);
    w = mk_cell(BYP, 3, 1'b0); expect_cell(w); send(w);
    w = mk_cell(APP, 4, 1'b1);                 send(w);   // dropped
    w = mk_cell(BYP, 5, 1'b1);                 send(w);   // dropped
    w = mk_cell(APP, 6, 1'b0); expect_cell(w); send(w);
    send(ctrl(8'h01, 8'd1, 32'h0000_00A5));
    send(ctrl(8'h01, 8'd0, 32'h0000_0044));
    in_soc <= 1'b0;
    repeat (80) @(posedge clk);
    check(ctrl_flags == 8'hA5, "flags written");
    check(app_vci == 16'h0044, "application VCI written");
    check(rx_ctrl.size() == 2, "two control answers");
    if (rx_ctrl.size() == 2) begin
      r = rx_ctrl[1];
      check(r[2] == 32'h8100_0000, "answer echoes the command");
      check(r[3] == 32'h44 && r[4] == 32'hA5, "answer carries the registers");
      check(r[5] == 32'd8, $sformatf("cells-in counter %0d", r[5]));
      check(r[6] == 32'd2, "HEC drop counter");
      check(r[7] == 32'd2, "application counter");
      check(r[8] == 32'd2, "bypass counter");
      check(r[9] == 32'd2, "control counter");
    end
    // old application VCI is now bypassed, the new one goes up
    w = mk_cell(APP, 7, 1'b0);     expect_cell(w); send(w);
    w = mk_cell(16'h44, 8, 1'b0);  expect_cell(w); send(w);

    // random mix of flows and damaged headers
    for (int i = 0; i < 30; i++) begin
      int kind;
      kind = $urandom_range(0, 3);
      w = mk_cell(kind == 0 ? 16'h44 : kind == 1 ? BYP : 16'($urandom_range(256, 4095)), 100 + i, kind == 3);
      if (kind != 3) expect_cell(w);
      else n_bad_sent++;
      send(w);
      if ($urandom_range(0, 3) == 0) begin
        in_soc <= 1'b0;
        repeat ($urandom_range(1, 20)) @(posedge clk);
      end
    end

    // receiver stops: nothing may leave, the bypass queue fills until the
    // sender is stopped, then everything drains in order
    in_soc <= 1'b0;
    repeat (200) @(posedge clk);
    out_tca <= 1'b0;
    repeat (2) @(posedge clk);
    w = mk_cell(16'h44, 10, 1'b0); expect_cell(w); send(w);
    for (int i = 0; i < 3; i++) begin
      w = mk_cell(BYP, 20 + i, 1'b0); expect_cell(w); send(w);
    end
    in_soc <= 1'b0;
    repeat (100) @(posedge clk);
    check(!in_tca, "sender stopped while the bypass queue is full");
    out_tca <= 1'b1;
    repeat (200) @(posedge clk);
    check(n_out_while_low == 0, "no cell started while out_tca low");
    foreach (exp_q[v])
      check(exp_q[v].size() == 0, $sformatf("all cells of VCI %h out (%0d left)", v, exp_q[v].size()));
    check(n_hec == n_bad_sent && n_ctl == 2, "event strobes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
