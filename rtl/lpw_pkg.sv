// lpw_pkg: types, constants and arithmetic shared by the layered protocol
// wrappers (cell, frame, IP and UDP processors) and the ROT13 application.
//
// Two word formats travel between the layers:
//   cell_word_t - one 32-bit word of an ATM cell. A cell is 14 consecutive
//                 words: the 4-byte cell header, a word holding the HEC in
//                 bits [31:24], then 12 words (48 bytes) of payload, most
//                 significant byte first. soc marks word 0.
//   lpw_word_t  - one 32-bit word of an AAL5 frame / IP packet with the
//                 framing flags the upper layers add: dataen (word valid),
//                 sof/eof (first/last word of the frame), sop (first word of
//                 the IP payload), sod (first word of the UDP payload), udp
//                 (the packet was accepted as UDP; valid from word 2 on) and
//                 be (which bytes of this word are UDP payload bytes; be[k]
//                 is the byte in bits [8k+7:8k]).
// Between the layers words are in network order (first byte in [31:24]);
// at the application interface of the UDP processor the bytes of each word
// are reversed (first byte in [7:0]), as in the FPX application interface.
// The 14-word cell layout and the header bit positions are this design's
// choice (the usual 32-bit FPX cell format); the CRC-8 HEC, the AAL5 CRC-32
// and the Internet ones' complement checksum are the standard algorithms.
package lpw_pkg;

  localparam int CELL_WORDS    = 14;  // words per cell on the 32-bit bus
  localparam int PAYLOAD_WORDS = 12;  // 48 payload bytes

  // AAL5 CRC-32 remainder left in the register after a frame including its
  // own (complemented) CRC field has been shifted through.
  localparam logic [31:0] AAL5_RESIDUE = 32'hC704_DD7B;

  typedef struct packed {
    logic [31:0] data;
    logic        soc;
    logic        valid;
  } cell_word_t;

  typedef struct packed {
    logic [31:0] data;
    logic        dataen;
    logic        sof;
    logic        eof;
    logic        sop;
    logic        sod;
    logic        udp;
    logic [3:0]  be;
  } lpw_word_t;

  // One-cycle event strobes gathered at the top for statistics.
  typedef struct packed {
    logic hec_drop;     // cell dropped, bad HEC
    logic cell_app;     // cell dispatched to the frame processor
    logic cell_bypass;  // cell of another flow bypassed
    logic cell_ctrl;    // control cell handled
    logic crc_ok;       // reassembled frame with a good AAL5 CRC
    logic crc_bad;      // reassembled frame with a bad AAL5 CRC
    logic ip_ok;        // IP packet accepted
    logic ip_drop;      // IP packet dropped (version / header checksum)
    logic udp_ok;       // UDP datagram with a good (or absent) checksum
    logic udp_bad;      // UDP datagram with a bad checksum
    logic non_udp;      // IP packet of another protocol
    logic udp_ovf;      // outgoing packet too long for the UDP buffer
  } lpw_events_t;

  // Header field positions inside cell word 0 (UNI format).
  function automatic logic [15:0] hdr_vci(input logic [31:0] h);
    return h[19:4];
  endfunction

  // ATM HEC: CRC-8, generator x^8+x^2+x+1, over the 4 header bytes, then
  // XORed with 0x55 (coset).
  function automatic logic [7:0] hec8(input logic [31:0] h);
    logic [7:0] c;
    c = 8'h00;
    for (int i = 31; i >= 0; i--) begin
      logic fb;
      fb = c[7] ^ h[i];
      c  = {c[6:0], 1'b0} ^ (fb ? 8'h07 : 8'h00);
    end
    return c ^ 8'h55;
  endfunction

  // AAL5 CRC-32 (generator 0x04C11DB7), one 32-bit word shifted in MSB
  // first. The register starts at all ones; the transmitted CRC is its
  // complement.
  function automatic logic [31:0] crc32_word(input logic [31:0] crc,
                                             input logic [31:0] d);
    logic [31:0] c;
    c = crc;
    for (int i = 31; i >= 0; i--) begin
      logic fb;
      fb = c[31] ^ d[i];
      c  = {c[30:0], 1'b0} ^ (fb ? 32'h04C1_1DB7 : 32'h0);
    end
    return c;
  endfunction

  // Byte order of the application interface: the first byte of a word in
  // bits [7:0] (the layers below use network order, first byte in [31:24]).
  function automatic logic [31:0] bswap32(input logic [31:0] d);
    return {d[7:0], d[15:8], d[23:16], d[31:24]};
  endfunction

  function automatic logic [3:0] rev4(input logic [3:0] b);
    return {b[0], b[1], b[2], b[3]};
  endfunction

  // 16-bit ones' complement addition (end-around carry).
  function automatic logic [15:0] oc_add(input logic [15:0] a,
                                         input logic [15:0] b);
    logic [16:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[15:0] + {15'd0, s[16]};
  endfunction

  // Fold a 32-bit accumulator of 16-bit terms into a 16-bit ones'
  // complement sum.
  function automatic logic [15:0] oc_fold(input logic [31:0] acc);
    logic [16:0] s;
    s = {1'b0, acc[31:16]} + {1'b0, acc[15:0]};
    s = {1'b0, s[15:0]} + {16'd0, s[16]};
    return s[15:0];
  endfunction

endpackage
