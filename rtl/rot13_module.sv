// rot13_module: a network module for the reprogrammable application device
// of the FPX. It holds the ROT13 UDP echo application inside the four
// protocol wrapper layers, so that the application sees UDP datagrams while
// the module itself exchanges ATM cells with the network interface device.
//
//   d_mod_in/soc_mod_in -> cell -> frame -> IP -> UDP -> udp_echo
//   d_mod_out/soc_mod_out <- cell <- frame <- IP <- UDP <-----+
//
// Cell interface: a cell is 14 consecutive 32-bit words, soc marking the
// header word (see lpw_pkg). tca_mod_out tells the sender it may start a new
// cell; tca_mod_in tells this module the same about the receiver. Cells of
// the application flow (VCI app_vci, control register 0) travel up through
// all layers and come back encrypted with swapped addresses; cells of other
// flows are bypassed by the cell processor, and control cells (VCI CTRL_VCI)
// read the counters and write the control registers (register 1 bit 0 turns
// the TTL decrement of the IP processor on).
//
// Inside the module, words between the layers are in network byte order;
// only at the application interface are the bytes of each word reversed
// (first byte in bits [7:0]), which the UDP processor does.
//
// Module interface: reset_l is the active-low reset (asynchronous assertion;
// the release is synchronised here). Cells that start while enable_l is high
// are ignored. ready_l goes low two clocks after reset is released. The
// memory interfaces of the network module are not used by this application
// and are left out. events carries one-clock strobes of what the layers did,
// for statistics outside the module.
module rot13_module
  import lpw_pkg::*;
(
  input  logic        clk,
  input  logic        reset_l,
  input  logic        enable_l,
  output logic        ready_l,
  input  logic [31:0] d_mod_in,
  input  logic        soc_mod_in,
  output logic        tca_mod_out,
  output logic [31:0] d_mod_out,
  output logic        soc_mod_out,
  input  logic        tca_mod_in,
  output lpw_events_t events
);
  logic [1:0] rst_sync;
  logic       rst_n;

  always_ff @(posedge clk or negedge reset_l) begin
    if (!reset_l) rst_sync <= 2'b00;
    else          rst_sync <= {rst_sync[0], 1'b1};
  end
  assign rst_n = rst_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ready_l <= 1'b1;
    else        ready_l <= 1'b0;
  end

  // cell processor <-> frame processor
  cell_word_t c2f, f2c;
  logic       c2f_tca, f2c_tca;
  // frame processor <-> IP processor
  lpw_word_t  f2i, i2f;
  logic       f2i_tca, i2f_tca;
  // IP processor <-> UDP processor
  lpw_word_t  i2u, u2i;
  logic       i2u_tca, u2i_tca;
  // UDP processor <-> application
  lpw_word_t  u2a, a2u;
  logic       u2a_tca, a2u_tca;

  logic [15:0] app_vci;
  logic [7:0]  ctrl_flags;

  cell_processor u_cell (
    .clk, .rst_n,
    .in_data(d_mod_in), .in_soc(soc_mod_in && !enable_l), .in_tca(tca_mod_out),
    .out_data(d_mod_out), .out_soc(soc_mod_out), .out_tca(tca_mod_in),
    .app_out(c2f), .app_out_tca(c2f_tca),
    .app_in(f2c), .app_in_tca(f2c_tca),
    .app_vci, .ctrl_flags,
    .ev_hec_drop(events.hec_drop), .ev_app(events.cell_app),
    .ev_bypass(events.cell_bypass), .ev_ctrl(events.cell_ctrl));

  frame_processor u_frame (
    .clk, .rst_n,
    .cell_in(c2f), .cell_in_tca(c2f_tca),
    .cell_out(f2c), .cell_out_tca(f2c_tca),
    .up_out(f2i), .up_out_tca(f2i_tca),
    .up_in(i2f), .up_in_tca(i2f_tca),
    .crc_ok(events.crc_ok), .crc_bad(events.crc_bad));

  ip_processor u_ip (
    .clk, .rst_n, .ttl_dec_en(ctrl_flags[0]),
    .lo_in(f2i), .lo_in_tca(f2i_tca),
    .lo_out(i2f), .lo_out_tca(i2f_tca),
    .hi_out(i2u), .hi_out_tca(i2u_tca),
    .hi_in(u2i), .hi_in_tca(u2i_tca),
    .ip_ok(events.ip_ok), .ip_drop(events.ip_drop));

  udp_processor u_udp (
    .clk, .rst_n,
    .lo_in(i2u), .lo_in_tca(i2u_tca),
    .lo_out(u2i), .lo_out_tca(u2i_tca),
    .hi_out(u2a), .hi_out_tca(u2a_tca),
    .hi_in(a2u), .hi_in_tca(a2u_tca),
    .udp_ok(events.udp_ok), .udp_bad(events.udp_bad),
    .non_udp(events.non_udp), .udp_ovf(events.udp_ovf));

  udp_echo u_app (
    .clk, .rst_n,
    .in(u2a), .in_tca(u2a_tca),
    .out(a2u), .out_tca(a2u_tca));
endmodule
