// tb_frame_processor: sends AAL5 frames of random length, as cells of the
// application flow, into the frame processor and loops its frame output
// straight back into its frame input, as an upper layer that returns every
// frame unchanged would. Checks:
//  - every frame comes back as the same cells, HEC word zero (the cell
//    processor fills it in), CRC-32 regenerated: a frame sent with a damaged
//    CRC comes back with the correct one;
//  - crc_ok / crc_bad for each frame, sof on the first and eof on the last
//    frame word, 12 frame words per cell;
//  - OAM cells inside a frame are dropped;
//  - no cell starts while the cell processor refuses (cell_out_tca low the
//    clock before), with cell_out_tca toggled at random;
//  - reassembly latency: the first frame word is seen 4 clocks after the
//    edge that drives the first cell's header word (two header words, one
//    register, one clock to be sampled here).
module tb_frame_processor;
  import lpw_pkg::*;
  import lpw_tb_pkg::*;

  localparam int UP_LATENCY = 4;
  localparam logic [15:0] VCI = 16'h0032;

  logic       clk = 1'b0, rst_n = 1'b0;
  cell_word_t cell_in = '0, cell_out;
  logic       cell_in_tca, cell_out_tca = 1'b1, tca_q = 1'b1;
  lpw_word_t  up_out, up_in;
  logic       up_in_tca, crc_ok, crc_bad;
  int checks = 0, failures = 0, cycle = 0;

  frame_processor dut (
    .clk, .rst_n, .cell_in, .cell_in_tca, .cell_out, .cell_out_tca,
    .up_out, .up_out_tca(up_in_tca), .up_in, .up_in_tca, .crc_ok, .crc_bad);

  always_ff @(posedge clk) up_in <= up_out;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    tca_q <= cell_out_tca;
  end

  initial begin
    repeat (100000) @(posedge clk);
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

  words_t exp_q;                  // expected output cell words, in order
  int     n_ok_exp = 0, n_bad_exp = 0, n_ok = 0, n_bad = 0;
  int     t_first_in = -1, t_first_up = -1;
  int     n_soc_refused = 0, n_out_words = 0;
  int     up_idx = 0;             // frame word index on up_out
  bit     in_frame = 0;

  // output cells
  int out_idx = -1;
  always @(posedge clk) if (rst_n) begin
    if (cell_out.valid) begin
      if (cell_out.soc) begin
        out_idx = 0;
        if (!tca_q) n_soc_refused++;
      end else out_idx++;
      n_out_words++;
      check(exp_q.size() != 0, "unexpected cell word");
      if (exp_q.size() != 0) begin
        logic [31:0] e;
        e = exp_q.pop_front();
        check(cell_out.data == e, $sformatf("cell word %0d: %08h expected %08h", out_idx, cell_out.data, e));
        check(cell_out.soc == (out_idx == 0), "soc on the header word only");
      end
    end
  end

  // frame stream going up
  always @(posedge clk) if (rst_n) begin
    n_ok  += int'(crc_ok);
    n_bad += int'(crc_bad);
    if (up_out.dataen) begin
      if (t_first_up < 0) t_first_up = cycle;
      check(up_out.sof == !in_frame, "sof on the first frame word");
      if (up_out.sof) up_idx = 0;
      else up_idx++;
      in_frame = !up_out.eof;
      if (up_out.eof) check((up_idx + 1) % 12 == 0, "frame length a whole number of cells");
    end
  end

  always @(posedge clk) if ($urandom_range(0, 3) == 0) cell_out_tca <= !cell_out_tca;

  task automatic send_cells(input words_t w, input bit with_oam);
    int ncell;
    ncell = w.size() / 14;
    for (int c = 0; c < ncell; c++) begin
      if (!cell_in_tca) begin
        cell_in <= '0;
        while (!cell_in_tca) @(posedge clk);
      end
      if (with_oam && c == ncell / 2) begin
        logic [31:0] h;
        h = make_hdr(VCI, 1'b0) | 32'h8;
        for (int k = 0; k < 14; k++) begin
          cell_in <= '{data: (k == 0) ? h : (k == 1) ? {ref_hec(h), 24'h0} : $urandom,
                       soc: k == 0, valid: 1'b1};
          @(posedge clk);
        end
      end
      for (int k = 0; k < 14; k++) begin
        if (t_first_in < 0) t_first_in = cycle;
        cell_in <= '{data: w[c*14+k], soc: k == 0, valid: 1'b1};
        @(posedge clk);
      end
      if ($urandom_range(0, 2) == 0) begin
        cell_in <= '0;
        repeat ($urandom_range(1, 30)) @(posedge clk);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (3) @(posedge clk);
    for (int f = 0; f < 40; f++) begin
      bytes_t pkt, pdu;
      words_t w, e;
      bit     bad;
      int     len;
      pkt = {};
      len = (f == 0) ? 20 : $urandom_range(1, 600);
      for (int i = 0; i < len; i++) pkt.push_back(8'($urandom));
      pdu = make_pdu(pkt);
      w   = make_cells(pdu, VCI);
      e   = w;
      for (int c = 0; c < e.size() / 14; c++) e[c*14+1] = 32'h0;
      exp_q = {exp_q, e};
      bad = (f % 5 == 3);
      if (bad) begin
        w[w.size() - 1] ^= 32'h0000_0100;
        n_bad_exp++;
      end else n_ok_exp++;
      send_cells(w, f % 7 == 2);
      if (f == 0) begin
        cell_in <= '0;
        repeat (40) @(posedge clk);
        check(t_first_up - t_first_in == UP_LATENCY,
              $sformatf("reassembly latency %0d clocks", t_first_up - t_first_in));
      end
    end
    cell_in <= '0;
    repeat (300) @(posedge clk);
    cell_out_tca <= 1'b1;
    repeat (2000) @(posedge clk);
    check(exp_q.size() == 0, $sformatf("all cells returned (%0d words left)", exp_q.size()));
    check(n_ok == n_ok_exp && n_bad == n_bad_exp,
          $sformatf("crc_ok %0d/%0d crc_bad %0d/%0d", n_ok, n_ok_exp, n_bad, n_bad_exp));
    check(n_soc_refused == 0, "no cell started after cell_out_tca low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
