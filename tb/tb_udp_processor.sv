// tb_udp_processor: drives both directions of the UDP processor at once.
//
// Ingress: IP packets (UDP with a correct, a damaged or no checksum, and
// other protocols), each followed by a few padding words as they arrive
// from the AAL5 layer. Checks that every word passes up unchanged one clock
// later with its bytes in application order, first byte in bits [7:0]
// (latency 2 clocks from the driving edge to the edge where the word is
// seen here), udp set from word 2 on for UDP packets only, sod on the
// first payload word, be marking exactly the payload bytes, and the
// udp_ok / udp_bad / non_udp strobes; lo_in_tca is hi_out_tca one clock
// later.
//
// Egress: packets in application byte order with garbage in the UDP
// checksum field, plus padding words, are written while hi_in_tca allows. Checks that UDP packets leave
// with the correct checksum and everything else unchanged, other packets
// leave unchanged, one oversize packet (1000 words) is discarded with
// udp_ovf while the packets around it survive, and no word leaves unless
// lo_out_tca was high the clock before; lo_out_tca is toggled at random.
module tb_udp_processor;
  import lpw_pkg::*;
  import lpw_tb_pkg::*;

  localparam int IN_LATENCY = 2;

  logic      clk = 1'b0, rst_n = 1'b0;
  lpw_word_t lo_in = '0, lo_out, hi_out, hi_in = '0;
  logic      lo_in_tca, lo_out_tca = 1'b1, hi_out_tca = 1'b1, hi_in_tca;
  logic      udp_ok, udp_bad, non_udp, udp_ovf, lo_out_tca_q = 1'b1, hi_out_tca_q = 1'b1;
  int checks = 0, failures = 0, cycle = 0;

  udp_processor dut (
    .clk, .rst_n, .lo_in, .lo_in_tca, .lo_out, .lo_out_tca,
    .hi_out, .hi_out_tca, .hi_in, .hi_in_tca, .udp_ok, .udp_bad, .non_udp, .udp_ovf);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    lo_out_tca_q <= lo_out_tca;
    hi_out_tca_q <= hi_out_tca;
  end

  initial begin
    repeat (200000) @(posedge clk);
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

  function automatic bytes_t rand_packet(input bit udp, input int minlen, input int maxlen);
    return make_packet(udp ? 8'd17 : 8'd6, 8'd64, $urandom, $urandom, 16'($urandom),
                       16'($urandom), rand_bytes($urandom_range(minlen, maxlen)),
                       $urandom_range(0, 2), 1'b1);
  endfunction

  function automatic words_t with_pad(input words_t w);
    for (int i = $urandom_range(0, 11); i > 0; i--) w.push_back($urandom);
    return w;
  endfunction

  // ------------------------------------------------------------ ingress
  typedef struct {
    words_t w;
    bit     udp;
    int     ihl, tot, kind;
  } pkt_t;
  pkt_t in_exp[$];
  pkt_t in_cur;
  int   in_idx = 0;
  int   n_ok_exp = 0, n_bad_exp = 0, n_non_exp = 0, n_ok = 0, n_bad = 0, n_non = 0;
  int   t_in = -1, t_out = -1;

  always @(posedge clk) if (rst_n) begin
    n_ok  += int'(udp_ok);
    n_bad += int'(udp_bad);
    n_non += int'(non_udp);
    if (cycle > 5) check(lo_in_tca == hi_out_tca_q, "lo_in_tca follows hi_out_tca");
    if (hi_out.dataen) begin
      if (t_out < 0) t_out = cycle;
      if (hi_out.sof) begin
        in_idx = 0;
        check(in_exp.size() != 0, "unexpected packet up");
        if (in_exp.size() != 0) in_cur = in_exp.pop_front();
      end else in_idx++;
      if (in_idx < in_cur.w.size()) begin
        logic [3:0] be;
        for (int b = 0; b < 4; b++) begin
          int n;
          n = 4 * in_idx + b;           // application byte order
          be[b] = in_cur.udp && n >= 4 * in_cur.ihl + 8 && n < in_cur.tot;
        end
        check(hi_out.data == bswap32(in_cur.w[in_idx]),
              $sformatf("up word %0d: %08h expected %08h", in_idx, hi_out.data,
                        bswap32(in_cur.w[in_idx])));
        check(hi_out.eof == (in_idx == in_cur.w.size() - 1), "eof up");
        if (hi_out.eof)
          check(udp_ok == (in_cur.kind == 0 || in_cur.kind == 2) && udp_bad == (in_cur.kind == 1) &&
                non_udp == (in_cur.kind == 3),
                $sformatf("verdict of packet kind %0d: ok %b bad %b non-UDP %b cks %04h len %0d", in_cur.kind,
                          udp_ok, udp_bad, non_udp, in_cur.w[in_cur.ihl + 1][15:0], in_cur.tot));
        check(hi_out.udp == (in_cur.udp && in_idx >= 2), $sformatf("udp flag word %0d", in_idx));
        check(hi_out.sod == (in_cur.udp && in_idx == in_cur.ihl + 2), $sformatf("sod word %0d", in_idx));
        check(hi_out.be == be, $sformatf("be word %0d: %b expected %b", in_idx, hi_out.be, be));
      end else check(1'b0, "packet up too long");
    end
  end

  // Drivers clear their bus only right before waiting, never as their last
  // step, so that back-to-back calls need no idle clock between them.
  task automatic ingress_one(input int kind);
    bytes_t p;
    pkt_t   e;
    words_t w;
    int     gap;
    int     c;
    p = rand_packet(kind != 3, 1, 300);
    c = 4 * int'(p[0][3:0]) + 6;                          // UDP checksum field
    case (kind)
      0: n_ok_exp++;
      1: begin                                              // checksum wrong,
        p[c] = p[c] ^ 8'h40;                                // but not zero (unused)
        if (p[c] == 8'h00 && p[c+1] == 8'h00) p[c] = 8'h80;
        n_bad_exp++;
      end
      2: begin p[c] = 8'h00; p[c+1] = 8'h00; n_ok_exp++; end  // no checksum
      default: n_non_exp++;
    endcase
    w = with_pad(bytes_to_words(p));
    e.w = w;
    e.udp = kind != 3;
    e.kind = kind;
    e.ihl = p[0][3:0];
    e.tot = {p[2], p[3]};
    in_exp.push_back(e);
    for (int i = 0; i < w.size(); i++) begin
      if (t_in < 0) t_in = cycle;
      lo_in <= '{data: w[i], dataen: 1'b1, sof: i == 0, eof: i == w.size() - 1,
                 sop: 1'b0, sod: 1'b0, udp: 1'b0, be: 4'h0};
      @(posedge clk);
    end
    gap = $urandom_range(0, 4);
    if (gap != 0) begin
      lo_in <= '0;
      repeat (gap) @(posedge clk);
    end
  endtask

  // ------------------------------------------------------------- egress
  words_t out_exp[$];
  words_t out_cur;
  int     out_idx = 0, n_out_refused = 0, n_ovf = 0;

  always @(posedge clk) if (rst_n) begin
    n_ovf += int'(udp_ovf);
    if (lo_out.dataen) begin
      if (!lo_out_tca_q) n_out_refused++;
      if (lo_out.sof) begin
        out_idx = 0;
        check(out_exp.size() != 0, "unexpected packet down");
        if (out_exp.size() != 0) out_cur = out_exp.pop_front();
      end else out_idx++;
      if (out_idx < out_cur.size()) begin
        check(lo_out.data == out_cur[out_idx],
              $sformatf("down word %0d: %08h expected %08h", out_idx, lo_out.data, out_cur[out_idx]));
        check(lo_out.eof == (out_idx == out_cur.size() - 1), "eof down");
      end else check(1'b0, "packet down too long");
    end
  end

  always @(posedge clk) if ($urandom_range(0, 4) == 0) lo_out_tca <= !lo_out_tca;

  task automatic egress_one(input bit udp, input bit huge);
    int gap, ihl;
    bytes_t p;
    words_t w;
    p = rand_packet(udp, huge ? 3900 : 1, huge ? 3900 : 500);
    ihl = p[0][3:0];
    w = with_pad(bytes_to_words(p));
    if (!huge) out_exp.push_back(w);
    if (udp) w[ihl + 1][15:0] = 16'($urandom);
    for (int i = 0; i < w.size(); i++) begin
      if (!hi_in_tca && !huge) begin
        hi_in <= '0;
        while (!hi_in_tca) @(posedge clk);
      end
      hi_in <= '{data: bswap32(w[i]), dataen: 1'b1, sof: i == 0, eof: i == w.size() - 1,
                 sop: 1'(i == ihl), sod: 1'(udp && i == ihl + 2), udp: 1'(udp && i >= 2),
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
        ingress_one(0);
        lo_in <= '0;
        repeat (5) @(posedge clk);
        check(t_out - t_in == IN_LATENCY, $sformatf("ingress latency %0d clocks", t_out - t_in));
        for (int i = 0; i < 200; i++) ingress_one($urandom_range(0, 3));
        lo_in <= '0;
      end
      begin
        for (int i = 0; i < 120; i++) egress_one($urandom_range(0, 3) != 0, i == 50);
        hi_in <= '0;
      end
      begin
        for (int i = 0; i < 20000; i++) begin
          @(posedge clk);
          if ($urandom_range(0, 5) == 0) hi_out_tca <= !hi_out_tca;
        end
        hi_out_tca <= 1'b1;
      end
    join
    lo_out_tca <= 1'b1;
    repeat (3000) @(posedge clk);
    check(in_exp.size() == 0, $sformatf("all packets up (%0d left)", in_exp.size()));
    check(out_exp.size() == 0, $sformatf("all packets down (%0d left)", out_exp.size()));
    check(n_ok == n_ok_exp && n_bad == n_bad_exp && n_non == n_non_exp,
          $sformatf("ok %0d/%0d bad %0d/%0d non-UDP %0d/%0d", n_ok, n_ok_exp, n_bad, n_bad_exp,
                    n_non, n_non_exp));
    check(n_ovf == 1, $sformatf("one oversize packet discarded (%0d)", n_ovf));
    check(n_out_refused == 0, "no word down after lo_out_tca low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
