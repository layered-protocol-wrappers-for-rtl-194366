// lpw_tb_pkg: reference models for the wrapper testbenches. Everything here
// works on byte queues, one byte at a time, and is written independently of
// the RTL: it builds IPv4/UDP packets, AAL5 frames and 14-word cells, and
// parses and checks what comes back.
package lpw_tb_pkg;

  typedef logic [7:0]  bytes_t[$];
  typedef logic [31:0] words_t[$];

  // ---------------------------------------------------------------- ROT13
  function automatic logic [7:0] ref_rot13(input logic [7:0] c);
    if (c >= "A" && c <= "Z") return 8'(((int'(c) - 65 + 13) % 26) + 65);
    if (c >= "a" && c <= "z") return 8'(((int'(c) - 97 + 13) % 26) + 97);
    return c;
  endfunction

  // ------------------------------------------------------------------ HEC
  // CRC-8 x^8+x^2+x+1, byte at a time, LSB of the polynomial handled by
  // an explicit division loop, then the 0x55 coset.
  function automatic logic [7:0] ref_hec(input logic [31:0] hdr);
    logic [15:0] r;
    r = 16'h0;
    for (int b = 3; b >= 0; b--) begin
      r[15:8] = r[15:8] ^ hdr[8*b +: 8];
      for (int i = 0; i < 8; i++) begin
        if (r[15]) r = (r << 1) ^ 16'h0700;
        else       r = r << 1;
      end
    end
    return r[15:8] ^ 8'h55;
  endfunction

  // -------------------------------------------------------------- CRC-32
  function automatic logic [31:0] ref_crc32(input bytes_t d);
    logic [31:0] c;
    c = 32'hFFFF_FFFF;
    foreach (d[n]) begin
      c = c ^ {d[n], 24'h0};
      for (int i = 0; i < 8; i++) c = c[31] ? ((c << 1) ^ 32'h04C1_1DB7) : (c << 1);
    end
    return ~c;
  endfunction

  // ------------------------------------------------- Internet checksum
  function automatic logic [15:0] ref_csum(input bytes_t d);
    int unsigned s;
    s = 0;
    for (int i = 0; i < d.size(); i += 2) begin
      s += 32'({d[i], (i + 1 < d.size()) ? d[i+1] : 8'h00});
      while (s > 32'hFFFF) s = (s & 32'hFFFF) + (s >> 16);
    end
    return ~16'(s);
  endfunction

  function automatic bytes_t str_bytes(input string s);
    bytes_t q;
    for (int i = 0; i < s.len(); i++) q.push_back(s[i]);
    return q;
  endfunction

  // IPv4 header (IHL 5 + opt_words) + UDP (or other protocol) datagram.
  function automatic bytes_t make_packet(input logic [7:0] proto, input logic [7:0] ttl,
                                         input logic [31:0] src, input logic [31:0] dst,
                                         input logic [15:0] sport, input logic [15:0] dport,
                                         input bytes_t payload, input int opt_words,
                                         input bit udp_csum);
    bytes_t p, ph, u;
    int     ihl, tot, ulen;
    logic [15:0] c;
    ihl  = 5 + opt_words;
    ulen = 8 + payload.size();
    tot  = ihl * 4 + ulen;
    p = {8'(8'h40 | ihl), 8'h00, 8'(tot >> 8), 8'(tot), 8'h12, 8'h34, 8'h40, 8'h00,
         ttl, proto, 8'h00, 8'h00,
         src[31:24], src[23:16], src[15:8], src[7:0], dst[31:24], dst[23:16], dst[15:8], dst[7:0]};
    for (int i = 0; i < opt_words; i++) p = {p, 8'h01, 8'h01, 8'h01, 8'h01};  // NOP options
    c = ref_csum(p);
    p[10] = c[15:8];
    p[11] = c[7:0];
    u = {sport[15:8], sport[7:0], dport[15:8], dport[7:0], 8'(ulen >> 8), 8'(ulen), 8'h00, 8'h00};
    u = {u, payload};
    if (udp_csum) begin
      ph = {src[31:24], src[23:16], src[15:8], src[7:0], dst[31:24], dst[23:16], dst[15:8], dst[7:0],
            8'h00, proto, 8'(ulen >> 8), 8'(ulen)};
      c = ref_csum({ph, u});
      if (c == 16'h0) c = 16'hFFFF;
      u[6] = c[15:8];
      u[7] = c[7:0];
    end
    return {p, u};
  endfunction

  // AAL5 CPCS-PDU: payload, zero padding, UU=0, CPI=0, length, CRC-32.
  function automatic bytes_t make_pdu(input bytes_t pkt);
    bytes_t f;
    logic [31:0] crc;
    int n;
    f = pkt;
    n = pkt.size();
    while ((f.size() + 8) % 48 != 0) f.push_back(8'h00);
    f = {f, 8'h00, 8'h00, 8'(n >> 8), 8'(n)};
    crc = ref_crc32(f);
    f = {f, crc[31:24], crc[23:16], crc[15:8], crc[7:0]};
    return f;
  endfunction

  function automatic logic [31:0] make_hdr(input logic [15:0] vci, input bit last);
    return {4'h0, 8'h00, vci, 2'b00, last, 1'b0};
  endfunction

  // 14-word cells of a PDU on one VCI.
  function automatic words_t make_cells(input bytes_t pdu, input logic [15:0] vci);
    words_t w;
    int ncell;
    ncell = pdu.size() / 48;
    for (int c = 0; c < ncell; c++) begin
      logic [31:0] h;
      h = make_hdr(vci, c == ncell - 1);
      w.push_back(h);
      w.push_back({ref_hec(h), 24'h0});
      for (int k = 0; k < 12; k++)
        w.push_back({pdu[c*48+4*k], pdu[c*48+4*k+1], pdu[c*48+4*k+2], pdu[c*48+4*k+3]});
    end
    return w;
  endfunction

  function automatic words_t bytes_to_words(input bytes_t b);
    words_t w;
    for (int i = 0; i < b.size(); i += 4)
      w.push_back({b[i], (i+1 < b.size()) ? b[i+1] : 8'h0, (i+2 < b.size()) ? b[i+2] : 8'h0,
                   (i+3 < b.size()) ? b[i+3] : 8'h0});
    return w;
  endfunction

  function automatic bytes_t words_to_bytes(input words_t w);
    bytes_t b;
    foreach (w[i]) b = {b, w[i][31:24], w[i][23:16], w[i][15:8], w[i][7:0]};
    return b;
  endfunction

  // The packet an echo of `pkt` should be: addresses and ports swapped,
  // payload ROT13, TTL lowered by ttl_dec, both checksums recomputed.
  function automatic bytes_t expect_echo(input bytes_t pkt, input int ttl_dec);
    bytes_t p, pl;
    int ihl, tot;
    ihl = int'(pkt[0][3:0]);
    tot = int'({pkt[2], pkt[3]});
    pl  = pkt[ihl*4+8 : tot-1];
    foreach (pl[i]) pl[i] = ref_rot13(pl[i]);
    p = make_packet(pkt[9], 8'(int'(pkt[8]) - ttl_dec),
                    {pkt[16], pkt[17], pkt[18], pkt[19]}, {pkt[12], pkt[13], pkt[14], pkt[15]},
                    {pkt[ihl*4+2], pkt[ihl*4+3]}, {pkt[ihl*4], pkt[ihl*4+1]}, pl, ihl - 5,
                    1'b1);
    return p;
  endfunction

endpackage
