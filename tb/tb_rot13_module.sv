// tb_rot13_module: end-to-end test of the ROT13 network module at its default
// parameters. It sends ATM cells carrying AAL5-framed IPv4/UDP packets, with
// bypass cells, control cells and faulty cells mixed in, and checks every
// cell that comes back against a byte-level reference model: HEC, AAL5 CRC
// and length, IP header, swapped addresses and ports, ROT13 payload and the
// UDP checksum. It counts how often each mechanism of the design happened
// (HEC drop, bypass, control write/read, TTL decrement, IP drop, non-UDP
// pass, UDP checksum error, CRC error, oversize discard, back-pressure on
// both sides, multi-cell segmentation, IP options) and fails any that never
// did. Throughput is checked on a stream of back-to-back cells, and the
// delay through the idle module on the two reference workloads: a one-cell
// datagram (67 clocks from first header word in to first header word out)
// and a datagram with 512 bytes of payload (213 clocks).
// It also checks the byte order at the application interface inside the
// module: the first word of 'Hello World' must arrive there as 6C6C6548.
module tb_rot13_module;
  import lpw_pkg::*;
  import lpw_tb_pkg::*;

  localparam logic [15:0] APP_VCI  = 16'h0032;
  localparam logic [15:0] APP_VCI2 = 16'h0077;
  localparam logic [15:0] CTRL_VCI = 16'h0023;
  localparam logic [15:0] BYP_VCI  = 16'h0040;
  // Delay through the idle module from the edge that drives the first cell's
  // header word to the edge where the first echoed header word is seen.
  localparam int SHORT_DELAY = 67;  // one-cell datagram
  localparam int LONG_DELAY  = 213; // 512-byte payload, 12 cells

  logic        clk = 1'b0;
  logic        reset_l = 1'b0;
  logic        enable_l = 1'b0;
  logic        ready_l;
  logic [31:0] d_mod_in = '0;
  logic        soc_mod_in = 1'b0;
  logic        tca_mod_out;
  logic [31:0] d_mod_out;
  logic        soc_mod_out;
  logic        tca_mod_in = 1'b1;
  lpw_events_t events;

  rot13_module dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // -------------------------------------------------------- event counts
  int n_hec_drop, n_app, n_byp, n_ctrl, n_crc_ok, n_crc_bad, n_ip_ok, n_ip_drop;
  int n_udp_ok, n_udp_bad, n_non_udp, n_ovf, n_tca_out_low, n_tca_in_low;
  always @(posedge clk) if (reset_l) begin
    n_hec_drop += int'(events.hec_drop);
    n_app      += int'(events.cell_app);
    n_byp      += int'(events.cell_bypass);
    n_ctrl     += int'(events.cell_ctrl);
    n_crc_ok   += int'(events.crc_ok);
    n_crc_bad  += int'(events.crc_bad);
    n_ip_ok    += int'(events.ip_ok);
    n_ip_drop  += int'(events.ip_drop);
    n_udp_ok   += int'(events.udp_ok);
    n_udp_bad  += int'(events.udp_bad);
    n_non_udp  += int'(events.non_udp);
    n_ovf      += int'(events.udp_ovf);
    n_tca_out_low += int'(!tca_mod_out && cycle > 50);
    n_tca_in_low  += int'(!tca_mod_in);
  end

  // ------------------------------------------------------------- driver
  // Cells go out back to back while tca_mod_out allows; d_mod_in and
  // soc_mod_in are written once per clock.
  task automatic send_cells(input words_t w, input int gap);
    for (int i = 0; i < w.size(); i += 14) begin
      if (!tca_mod_out) begin
        d_mod_in   <= '0;
        soc_mod_in <= 1'b0;
        while (!tca_mod_out) @(posedge clk);
      end
      for (int k = 0; k < 14; k++) begin
        d_mod_in   <= w[i+k];
        soc_mod_in <= (k == 0);
        @(posedge clk);
      end
      if (gap > 0) begin
        d_mod_in   <= '0;
        soc_mod_in <= 1'b0;
        repeat (gap) @(posedge clk);
      end
    end

  endtask

  task automatic idle_in();
    d_mod_in   <= '0;
    soc_mod_in <= 1'b0;
  endtask

  // ------------------------------------------------------------ monitor
  // Expected output, in order per VCI.
  bytes_t exp_pkts[$];            // application flow packets
  words_t exp_byp[$];             // bypassed cells (14 words each)
  int     n_rx_pkts, n_rx_byp, n_rx_ctrl, n_multi;
  bytes_t rx_pdu;
  int     rx_cells_in_pdu;
  words_t cur;
  int     t_rx_first, t_rx_last;  // first header word / last word of the last echoed frame
  logic [31:0] last_status [12];
  logic [15:0] cur_app_vci = APP_VCI;

  always @(posedge clk) if (reset_l) begin
    if (soc_mod_out || cur.size() != 0) begin
      cur.push_back(d_mod_out);
      if (cur.size() == 14) begin
        process_cell(cur);
        cur = {};
      end
    end
  end

  // Application interface byte order: the first payload word of the first
  // datagram ('Hell' of 'Hello World') reaches the application as 6C6C6548.
  bit seen_first_sod = 0;
  always @(posedge clk) if (reset_l && dut.u2a.dataen && dut.u2a.sod && !seen_first_sod) begin
    seen_first_sod = 1;
    check(dut.u2a.data == 32'h6C6C_6548,
          $sformatf("first payload word at the application %08h", dut.u2a.data));
  end

  task automatic process_cell(input words_t c);
    logic [15:0] vci;
    vci = c[0][19:4];
    check(c[1] == {ref_hec(c[0]), 24'h0}, $sformatf("HEC of outgoing cell %08h", c[0]));
    if (vci == CTRL_VCI) begin
      n_rx_ctrl++;
      for (int k = 0; k < 12; k++) last_status[k] = c[2+k];
    end else if (vci != cur_app_vci) begin
      words_t e;
      n_rx_byp++;
      check(exp_byp.size() != 0, "unexpected bypass cell");
      if (exp_byp.size() != 0) begin
        e = exp_byp.pop_front();
        for (int k = 0; k < 14; k++) check(c[k] == e[k], $sformatf("bypass word %0d", k));
      end
    end else begin
      if (rx_cells_in_pdu == 0) t_rx_first = cycle - 13;   // header word of the first cell
      for (int k = 2; k < 14; k++)
        rx_pdu = {rx_pdu, c[k][31:24], c[k][23:16], c[k][15:8], c[k][7:0]};
      rx_cells_in_pdu++;
      if (c[0][1]) begin
        bytes_t e, pdu;
        t_rx_last = cycle;
        pdu = rx_pdu;
        rx_pdu = {};
        if (rx_cells_in_pdu > 1) n_multi++;
        rx_cells_in_pdu = 0;
        n_rx_pkts++;
        check(exp_pkts.size() != 0, "unexpected packet");
        if (exp_pkts.size() != 0) begin
          e = make_pdu(exp_pkts.pop_front());
          check(pdu.size() == e.size(), $sformatf("PDU size %0d, expected %0d", pdu.size(), e.size()));
          if (pdu.size() == e.size())
            for (int k = 0; k < e.size(); k++)
              check(pdu[k] == e[k], $sformatf("PDU byte %0d: %02h, expected %02h", k, pdu[k], e[k]));
        end
      end
    end
  endtask

  // ----------------------------------------------------------- stimulus
  function automatic bytes_t udp_pkt(input string s, input int opt, input logic [7:0] ttl);
    return make_packet(8'd17, ttl, 32'hC0A8_0001, 32'hC0A8_0002, 16'd1234, 16'd7, str_bytes(s),
                       opt, 1'b1);
  endfunction

  function automatic bytes_t long_payload(input int n);
    bytes_t b;
    for (int i = 0; i < n; i++) b.push_back(8'(32 + (i * 7) % 95));
    return b;
  endfunction

  task automatic send_pkt(input bytes_t p, input logic [15:0] vci, input int gap);
    send_cells(make_cells(make_pdu(p), vci), gap);
  endtask

  function automatic words_t ctrl_cell(input logic [7:0] op, input logic [7:0] addr,
                                       input logic [31:0] wdata);
    bytes_t pl;
    words_t w;
    pl = {op, 8'h00, 8'h00, addr, wdata[31:24], wdata[23:16], wdata[15:8], wdata[7:0]};
    while (pl.size() < 48) pl.push_back(8'h00);
    w = make_cells(pl, CTRL_VCI);
    return w;
  endfunction

  task automatic wait_idle(input int n);
    repeat (n) @(posedge clk);
  endtask

  initial begin
    bytes_t p, pl;
    words_t w;
    int t0, t1, n_before;

    repeat (4) @(posedge clk);
    reset_l <= 1'b1;
    repeat (4) @(posedge clk);
    check(!ready_l, "ready_l low after reset");

    // 1. short datagram, one cell: 'Hello World' -> 'Uryyb Jbeyq'
    p = udp_pkt("Hello World", 0, 8'd64);
    exp_pkts.push_back(expect_echo(p, 0));
    t0 = cycle;
    send_pkt(p, APP_VCI, 0);
    t1 = cycle;
    wait_idle(300);
    check(n_rx_pkts == 1, "short datagram echoed");
    $display("short datagram: first word in to first word out %0d clocks, last in to last out %0d",
             t_rx_first - t0, t_rx_last - t1);
    check(t_rx_first - t0 == SHORT_DELAY, $sformatf("short datagram delay %0d clocks", t_rx_first - t0));

    // 2. long datagram, 512 bytes of payload (12 cells)
    p = make_packet(8'd17, 8'd64, 32'h0A00_0001, 32'h0A00_0002, 16'd5000, 16'd7,
                    long_payload(512), 0, 1'b1);
    exp_pkts.push_back(expect_echo(p, 0));
    t0 = cycle;
    send_pkt(p, APP_VCI, 0);
    t1 = cycle;
    wait_idle(600);
    check(n_rx_pkts == 2, "long datagram echoed");
    $display("long datagram: first word in to first word out %0d clocks, last in to last out %0d",
             t_rx_first - t0, t_rx_last - t1);
    check(t_rx_first - t0 == LONG_DELAY, $sformatf("long datagram delay %0d clocks", t_rx_first - t0));

    // 3. a cell of another flow is bypassed unchanged
    w = make_cells(make_pdu(str_bytes("bypass me")), BYP_VCI);
    exp_byp.push_back(w);
    send_cells(w, 0);
    // 4. a cell with a bad HEC is dropped
    w = make_cells(make_pdu(udp_pkt("dropped", 0, 8'd9)), APP_VCI);
    w[1] = w[1] ^ 32'h0100_0000;
    send_cells(w, 0);
    wait_idle(200);
    check(n_rx_byp == 1, "bypass cell came back");
    check(n_hec_drop == 1, "bad HEC counted");
    check(n_rx_pkts == 2, "bad-HEC cell produced nothing");

    // 5. control cell: turn the TTL decrement on
    send_cells(ctrl_cell(8'h01, 8'd1, 32'h1), 0);
    wait_idle(100);
    check(n_rx_ctrl == 1, "control answer");
    check(last_status[0] == 32'h8100_0001, "control answer echoes command");
    check(last_status[2] == 32'h1, "flags register written");
    check(last_status[1] == {16'h0, APP_VCI}, "app VCI register");
    check(last_status[4] == 32'd1, "HEC drop counter");
    p = udp_pkt("Ttl test", 0, 8'd10);
    exp_pkts.push_back(expect_echo(p, 1));
    send_pkt(p, APP_VCI, 0);
    wait_idle(300);
    check(n_rx_pkts == 3, "TTL packet echoed");

    // 6. control cell: move the application to another VCI, TTL off again
    send_cells(ctrl_cell(8'h01, 8'd0, {16'h0, APP_VCI2}), 0);
    send_cells(ctrl_cell(8'h01, 8'd1, 32'h0), 0);
    wait_idle(100);
    cur_app_vci = APP_VCI2;
    send_cells(ctrl_cell(8'h02, 8'd0, 32'h0), 0);
    wait_idle(100);
    check(n_rx_ctrl == 4, "control answers");
    check(last_status[1] == {16'h0, APP_VCI2}, "app VCI changed");
    check(last_status[0] == 32'h8200_0000, "read command echoed");
    p = udp_pkt("New flow, IP options", 2, 8'd33);
    exp_pkts.push_back(expect_echo(p, 0));
    send_pkt(p, APP_VCI2, 0);
    // the old application VCI is now bypassed
    w = make_cells(make_pdu(str_bytes("old vci")), APP_VCI);
    exp_byp.push_back(w);
    send_cells(w, 0);
    wait_idle(300);
    check(n_rx_pkts == 4, "packet on new VCI echoed");

    // 7. bad IP header checksum and bad version are dropped
    p = udp_pkt("bad ip checksum", 0, 8'd64);
    p[11] = p[11] ^ 8'h01;
    send_pkt(p, APP_VCI2, 0);
    p = udp_pkt("bad ip version", 0, 8'd64);
    p[0] = 8'h65;
    send_pkt(p, APP_VCI2, 0);
    // 8. another protocol passes unchanged
    p = make_packet(8'd6, 8'd64, 32'h0A00_0001, 32'h0A00_0002, 16'd80, 16'd81,
                    str_bytes("tcp-ish data"), 0, 1'b0);
    exp_pkts.push_back(p);
    send_pkt(p, APP_VCI2, 0);
    // 9. bad UDP checksum is reported, the echo carries a fresh one
    p = udp_pkt("bad udp checksum", 0, 8'd64);
    p[27] = p[27] ^ 8'h40;
    exp_pkts.push_back(expect_echo(p, 0));
    send_pkt(p, APP_VCI2, 0);
    // 10. bad AAL5 CRC is reported, the frame still goes through
    p = udp_pkt("bad crc", 0, 8'd64);
    exp_pkts.push_back(expect_echo(p, 0));
    w = make_cells(make_pdu(p), APP_VCI2);
    w[13] = w[13] ^ 32'h1;
    send_cells(w, 0);
    wait_idle(400);
    check(n_ip_drop == 2, "two IP packets dropped");
    check(n_non_udp == 1, "non-UDP packet seen");
    check(n_udp_bad == 1, "bad UDP checksum seen");
    check(n_crc_bad == 1, "bad CRC seen");
    check(n_rx_pkts == 7, "non-UDP, bad-UDP and bad-CRC packets came back");

    // 11. a datagram too long for the UDP buffer is discarded
    p = make_packet(8'd17, 8'd64, 32'h0A00_0001, 32'h0A00_0002, 16'd1, 16'd7,
                    long_payload(4400), 0, 1'b1);
    send_pkt(p, APP_VCI2, 0);
    wait_idle(1500);
    check(n_ovf == 1, "oversize datagram discarded");
    check(n_rx_pkts == 7, "oversize datagram produced nothing");

    // 12. throughput: 40 one-cell datagrams back to back
    n_before = n_rx_pkts;
    t0 = cycle;
    for (int i = 0; i < 40; i++) begin
      p = udp_pkt($sformatf("Stream %02d", i), 0, 8'd64);  // one cell each
      exp_pkts.push_back(expect_echo(p, 0));
      send_pkt(p, APP_VCI2, 0);
    end
    t1 = cycle;
    check(t1 - t0 <= 40 * 14 + 4, $sformatf("40 cells accepted in %0d clocks", t1 - t0));
    wait_idle(300);
    check(n_rx_pkts == n_before + 40, "stream echoed");

    // 13. back-pressure from the receiver during long datagrams
    fork
      begin
        for (int i = 0; i < 10; i++) begin
          p = make_packet(8'd17, 8'd64, 32'h0A00_0003, 32'h0A00_0004, 16'd9, 16'd7,
                          long_payload(512 + 40 * i), 0, 1'b1);
          exp_pkts.push_back(expect_echo(p, 0));
          send_pkt(p, APP_VCI2, 0);
        end
      end
      begin
        repeat (200) @(posedge clk);
        for (int i = 0; i < 8; i++) begin
          tca_mod_in <= 1'b0;
          repeat (600) @(posedge clk);
          tca_mod_in <= 1'b1;
          repeat (40) @(posedge clk);
        end
      end
    join
    tca_mod_in <= 1'b1;
    wait_idle(2000);
    check(n_rx_pkts == n_before + 50, $sformatf("datagrams under back-pressure echoed (%0d)", n_rx_pkts));
    check(exp_pkts.size() == 0, "no packet missing");
    check(exp_byp.size() == 0, "no bypass cell missing");

    // mechanisms seen
    check(n_hec_drop > 0, "mechanism: HEC drop");
    check(n_byp > 0, "mechanism: bypass");
    check(n_ctrl > 0, "mechanism: control cells");
    check(n_crc_ok > 0 && n_crc_bad > 0, "mechanism: CRC check");
    check(n_ip_ok > 0 && n_ip_drop > 0, "mechanism: IP check");
    check(n_udp_ok > 0 && n_udp_bad > 0, "mechanism: UDP check");
    check(n_non_udp > 0, "mechanism: non-UDP");
    check(n_ovf > 0, "mechanism: UDP buffer overflow");
    check(n_multi > 0, "mechanism: multi-cell segmentation");
    check(n_tca_out_low > 0, "mechanism: back-pressure to the sender");
    check(n_tca_in_low > 0, "mechanism: back-pressure from the receiver");
    $display("events: hec_drop=%0d app=%0d bypass=%0d ctrl=%0d crc_ok=%0d crc_bad=%0d ip_ok=%0d ip_drop=%0d",
             n_hec_drop, n_app, n_byp, n_ctrl, n_crc_ok, n_crc_bad, n_ip_ok, n_ip_drop);
    $display("        udp_ok=%0d udp_bad=%0d non_udp=%0d ovf=%0d multi=%0d tca_out_low=%0d tca_in_low=%0d",
             n_udp_ok, n_udp_bad, n_non_udp, n_ovf, n_multi, n_tca_out_low, n_tca_in_low);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
