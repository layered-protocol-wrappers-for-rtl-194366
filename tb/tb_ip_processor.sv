// tb_ip_processor: drives both directions of the IP processor at once.
//
// Ingress: frames (an IPv4 packet followed by a few words of AAL5 padding
// and trailer) with random sizes, header options, TTLs and protocols; some
// have a damaged header checksum, a wrong version or are cut short. Checks
// that good packets come out whole and in order with sof/eof, sop on word
// IHL, the TTL lowered by one and the header checksum still correct when
// the TTL decrement is on, that bad ones never come out, the ip_ok/ip_drop
// strobes, that lo_in_tca is hi_out_tca one clock later, and the ingress
// latency: the first word of a packet with a five-word header is seen 7
// clocks after the edge that drives it (the header must be checked first).
//
// Egress: packets with garbage in the checksum field and random sop/sod/
// udp/be flags are written while hi_in_tca allows. Checks that each leaves
// with a correct header checksum, the flags cleared and everything else
// unchanged, and that no word leaves unless lo_out_tca was high the clock
// before; lo_out_tca is toggled at random.
module tb_ip_processor;
  import lpw_pkg::*;
  import lpw_tb_pkg::*;

  localparam int IN_LATENCY = 7;

  logic      clk = 1'b0, rst_n = 1'b0, ttl_dec_en = 1'b0;
  lpw_word_t lo_in = '0, lo_out, hi_out, hi_in = '0;
  logic      lo_in_tca, lo_out_tca = 1'b1, hi_out_tca = 1'b1, hi_in_tca;
  logic      ip_ok, ip_drop, lo_out_tca_q = 1'b1, hi_out_tca_q = 1'b1;
  int checks = 0, failures = 0, cycle = 0;

  ip_processor dut (
    .clk, .rst_n, .ttl_dec_en, .lo_in, .lo_in_tca, .lo_out, .lo_out_tca,
    .hi_out, .hi_out_tca, .hi_in, .hi_in_tca, .ip_ok, .ip_drop);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    lo_out_tca_q <= lo_out_tca;
    hi_out_tca_q <= hi_out_tca;
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

  function automatic bytes_t rand_bytes(input int n);
    bytes_t b;
    for (int i = 0; i < n; i++) b.push_back(8'($urandom));
    return b;
  endfunction

  function automatic bytes_t rand_packet();
    return make_packet($urandom_range(0, 1) ? 8'd17 : 8'd6, 8'($urandom_range(0, 255)),
                       $urandom, $urandom, 16'($urandom), 16'($urandom),
                       rand_bytes($urandom_range(0, 200)), $urandom_range(0, 3), 1'b1);
  endfunction

  // ------------------------------------------------------------ ingress
  words_t in_exp[$];
  int     in_sop_exp[$];
  int     n_ok_exp = 0, n_drop_exp = 0, n_ok = 0, n_drop = 0;
  int     t_in = -1, t_out = -1;
  words_t in_cur;
  int     in_idx = 0;

  always @(posedge clk) if (rst_n) begin
    n_ok   += int'(ip_ok);
    n_drop += int'(ip_drop);
    if (cycle > 5) check(lo_in_tca == hi_out_tca_q, "lo_in_tca follows hi_out_tca");
    if (hi_out.dataen) begin
      if (t_out < 0) t_out = cycle;
      if (hi_out.sof) begin
        in_idx = 0;
        check(in_exp.size() != 0, "unexpected packet up");
        if (in_exp.size() != 0) in_cur = in_exp.pop_front();
      end else in_idx++;
      if (in_idx < in_cur.size()) begin
        check(hi_out.data == in_cur[in_idx],
              $sformatf("up word %0d: %08h expected %08h", in_idx, hi_out.data, in_cur[in_idx]));
        check(hi_out.eof == (in_idx == in_cur.size() - 1), "eof up");
        check(hi_out.sop == (in_idx == in_cur[0][27:24]), "sop on word IHL");
      end else check(1'b0, "packet up too long");
    end
  end

  // Drivers clear their bus only right before waiting, never as their last
  // step, so that back-to-back calls need no idle clock between them.
  task automatic send_frame(input words_t w);
    int gap;
    for (int i = 0; i < w.size(); i++) begin
      if (i % 12 == 0 && !lo_in_tca) begin
        lo_in <= '0;
        while (!lo_in_tca) @(posedge clk);
      end
      if (t_in < 0) t_in = cycle;
      lo_in <= '{data: w[i], dataen: 1'b1, sof: i == 0, eof: i == w.size() - 1,
                 sop: 1'b0, sod: 1'b0, udp: 1'b0, be: 4'h0};
      @(posedge clk);
    end
    gap = $urandom_range(0, 5);
    if (gap != 0) begin
      lo_in <= '0;
      repeat (gap) @(posedge clk);
    end
  endtask

  task automatic ingress_one(input int kind, input bit dec);
    bytes_t p, pe;
    words_t w, e;
    int     pad;
    p = rand_packet();
    pad = $urandom_range(0, 11);
    pe = p;
    if (dec && p[8] != 8'd0) begin
      logic [15:0] c;
      pe[8] = p[8] - 8'd1;
      pe[10] = 8'h00;
      pe[11] = 8'h00;
      c = ref_csum(pe[0 : 4 * int'(p[0][3:0]) - 1]);
      pe[10] = c[15:8];
      pe[11] = c[7:0];
    end
    case (kind)
      1: p[12] ^= 8'h01;                         // header checksum wrong
      2: begin p[0] = 8'h65; p[11] = p[11] - 8'h20; end  // version 6, sum still right
      3: p = p[0:11];                            // cut short
      default: ;
    endcase
    w = bytes_to_words(p);
    e = bytes_to_words(pe);
    for (int i = 0; i < pad; i++) begin
      logic [31:0] r;
      r = $urandom;
      w.push_back(r);
      e.push_back(r);
    end
    if (kind == 0) begin
      in_exp.push_back(e);
      n_ok_exp++;
    end else n_drop_exp++;
    send_frame(w);
  endtask

  // ------------------------------------------------------------- egress
  words_t out_exp[$];
  words_t out_cur;
  int     out_idx = 0, n_out_refused = 0, n_out_pkts = 0;

  always @(posedge clk) if (rst_n) begin
    if (lo_out.dataen) begin
      if (!lo_out_tca_q) n_out_refused++;
      if (lo_out.sof) begin
        out_idx = 0;
        n_out_pkts++;
        check(out_exp.size() != 0, "unexpected packet down");
        if (out_exp.size() != 0) out_cur = out_exp.pop_front();
      end else out_idx++;
      if (out_idx < out_cur.size()) begin
        check(lo_out.data == out_cur[out_idx],
              $sformatf("down word %0d: %08h expected %08h", out_idx, lo_out.data, out_cur[out_idx]));
        check(lo_out.eof == (out_idx == out_cur.size() - 1), "eof down");
        check(!lo_out.sop && !lo_out.sod && !lo_out.udp && lo_out.be == 4'h0, "flags cleared");
      end else check(1'b0, "packet down too long");
    end
  end

  always @(posedge clk) if ($urandom_range(0, 4) == 0) lo_out_tca <= !lo_out_tca;

  task automatic egress_one();
    int gap;
    bytes_t p;
    words_t w;
    p = rand_packet();
    out_exp.push_back(bytes_to_words(p));
    p[10] = 8'($urandom);
    p[11] = 8'($urandom);
    w = bytes_to_words(p);
    for (int i = 0; i < w.size(); i++) begin
      if (!hi_in_tca) begin
        hi_in <= '0;
        while (!hi_in_tca) @(posedge clk);
      end
      hi_in <= '{data: w[i], dataen: 1'b1, sof: i == 0, eof: i == w.size() - 1,
                 sop: 1'(i == int'(p[0][3:0])), sod: 1'($urandom), udp: 1'($urandom),
                 be: 4'($urandom)};
      @(posedge clk);
    end
    gap = $urandom_range(0, 3);
    if (gap != 0) begin
      hi_in <= '0;
      repeat (gap) @(posedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (3) @(posedge clk);
    fork
      begin
        // latency on an idle processor, five-word header
        bytes_t p;
        p = make_packet(8'd17, 8'd64, 32'h0a000001, 32'h0a000002, 16'd1, 16'd2,
                        str_bytes("latency"), 0, 1'b1);
        in_exp.push_back(bytes_to_words(p));
        n_ok_exp++;
        send_frame(bytes_to_words(p));
        lo_in <= '0;
        repeat (20) @(posedge clk);
        check(t_out - t_in == IN_LATENCY, $sformatf("ingress latency %0d clocks", t_out - t_in));
        for (int i = 0; i < 150; i++) begin
          if (i == 60) begin
            lo_in <= '0;
            repeat (30) @(posedge clk);
            ttl_dec_en <= 1'b1;
            @(posedge clk);
          end
          ingress_one((i % 4 == 1) ? $urandom_range(1, 3) : 0, i >= 60);
        end
        lo_in <= '0;
      end
      begin
        for (int i = 0; i < 150; i++) egress_one();
        hi_in <= '0;
      end
      begin
        for (int i = 0; i < 4000; i++) begin
          @(posedge clk);
          if ($urandom_range(0, 5) == 0) hi_out_tca <= !hi_out_tca;
        end
        hi_out_tca <= 1'b1;
      end
    join
    lo_out_tca <= 1'b1;
    repeat (300) @(posedge clk);
    check(in_exp.size() == 0, $sformatf("all good packets up (%0d left)", in_exp.size()));
    check(out_exp.size() == 0, $sformatf("all packets down (%0d left)", out_exp.size()));
    check(n_ok == n_ok_exp && n_drop == n_drop_exp,
          $sformatf("ip_ok %0d/%0d ip_drop %0d/%0d", n_ok, n_ok_exp, n_drop, n_drop_exp));
    check(n_out_refused == 0, "no word down after lo_out_tca low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
