// tb_udp_echo: feeds the UDP echo application with framed IP packets, marked
// the way the UDP processor marks them (udp, sop, sod, be), with random idle
// clocks between words. Checks that addresses and ports are swapped, that
// exactly the payload bytes are ROT13-encrypted, that non-UDP packets pass
// unchanged and that every word keeps its framing. Words are in the byte
// order of the application interface: first byte in bits [7:0].
module tb_udp_echo;
  import lpw_pkg::*;
  import lpw_tb_pkg::*;

  logic      clk = 1'b0, rst_n = 1'b0;
  lpw_word_t in_w, out_w;
  logic      in_tca, out_tca = 1'b1;
  int checks = 0, failures = 0;

  udp_echo dut (.clk, .rst_n, .in(in_w), .in_tca, .out(out_w), .out_tca);

  always #5 clk = ~clk;

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
      $display("FAIL: %s", what);
    end
  endtask

  lpw_word_t exp_q[$];

  // Build the marked input words and the expected output words of one frame.
  task automatic send_frame(input bytes_t pkt, input int max_gap);
    bytes_t pdu, e;
    words_t w, ew;
    int ihl, ulen, is_udp, n;
    pdu = make_pdu(pkt);
    ihl = pkt[0][3:0];
    is_udp = (pkt[9] == 8'd17);
    ulen = {pkt[ihl*4+4], pkt[ihl*4+5]};
    e = pdu;
    if (is_udp) begin
      for (int k = 0; k < 4; k++) begin
        e[12+k] = pdu[16+k];
        e[16+k] = pdu[12+k];
        e[ihl*4+k] = pdu[ihl*4 + ((k + 2) % 4)];
      end
      for (int k = ihl*4+8; k < ihl*4+ulen; k++) e[k] = ref_rot13(pdu[k]);
    end
    w  = bytes_to_words(pdu);
    ew = bytes_to_words(e);
    n  = w.size();
    for (int i = 0; i < n; i++) begin
      lpw_word_t x;
      x = '0;
      x.data   = bswap32(w[i]);   // application byte order
      x.dataen = 1'b1;
      x.sof    = (i == 0);
      x.eof    = (i == n - 1);
      x.sop    = (i == ihl);
      x.udp    = is_udp && i >= 2;
      x.sod    = is_udp && i == ihl + 2 && ulen > 8;
      for (int j = 0; j < 4; j++) begin
        int b;
        b = 4*i + j;
        x.be[j] = is_udp && b >= ihl*4 + 8 && b < ihl*4 + ulen;
      end
      in_w <= x;
      x.data = bswap32(ew[i]);
      exp_q.push_back(x);
      @(posedge clk);
      if (max_gap > 0) begin
        int g;
        g = $urandom_range(max_gap);
        if (g > 0) begin
          in_w <= '0;
          repeat (g) @(posedge clk);
        end
      end
    end
  endtask

  // compare everything that comes out
  int n_out = 0;
  always @(posedge clk) if (rst_n && out_w.dataen) begin
    lpw_word_t e;
    n_out++;
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL: unexpected word %08h", out_w.data);
    end else begin
      e = exp_q.pop_front();
      if (out_w !== e) begin
        failures++;
        $display("FAIL: word %0d out %08h sof%b eof%b, expected %08h sof%b eof%b", n_out,
                 out_w.data, out_w.sof, out_w.eof, e.data, e.sof, e.eof);
      end
    end
  end

  initial begin
    bytes_t pl;
    in_w = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(in_tca == out_tca, "tca passes through");
    send_frame(make_packet(8'd17, 8'd64, 32'hC0A8_0001, 32'hC0A8_0002, 16'd1234, 16'd7,
                           str_bytes("Hello World"), 0, 1'b1), 0);
    send_frame(make_packet(8'd17, 8'd64, 32'h0102_0304, 32'h0506_0708, 16'd1, 16'd2,
                           str_bytes("Network data encryption / decryption, ROT13 ABCxyz"), 2, 1'b1), 0);
    send_frame(make_packet(8'd6, 8'd64, 32'h0102_0304, 32'h0506_0708, 16'd1, 16'd2,
                           str_bytes("not udp: stays as is"), 0, 1'b0), 0);
    for (int r = 0; r < 20; r++) begin
      pl = {};
      for (int i = 0; i < $urandom_range(200); i++) pl.push_back(8'($urandom_range(255)));
      send_frame(make_packet(8'd17, 8'($urandom_range(255)), $urandom, $urandom, 16'($urandom),
                             16'($urandom), pl, $urandom_range(3), 1'b1), (r % 2) ? 3 : 0);
    end
    in_w <= '0;
    repeat (10) @(posedge clk);
    check(exp_q.size() == 0, $sformatf("all words came out (%0d left)", exp_q.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
