// design_top: the two designs of this repository side by side, each with its
// own ports and sharing only the clock and reset:
//  - the ToR switch upstream path (tor_south_extension): tagging, active
//    destination queues, paged shared buffer, lock and TDMA slot commands;
//  - the vessel-detection CNN accelerator (cnn_accelerator).
// Nothing connects the two; the ports are those of the two tops, the CNN's
// prefixed with cnn_.
module design_top (
  input  logic          clk,
  input  logic          rst_n,
  // ToR switch.
  input  logic          cfg_we,
  input  logic [10:0]   cfg_idx,
  input  logic [47:0]   cfg_mac,
  input  logic          cfg_valid,
  input  logic          s_valid,
  output logic          s_ready,
  input  logic [63:0]   s_data,
  input  logic [3:0]    s_bytes,
  input  logic          s_last,
  input  logic          rx_valid,
  input  logic [31:0]   rx_data,
  input  logic          rx_last,
  output logic          m_valid,
  output logic [511:0]  m_data,
  output logic          m_last,
  output logic [11:0]   m_useful,
  output logic          slot_start,
  output logic [6:0]    slot,
  output logic [5:0]    vlan,
  output logic [7:0]    wavelength,
  output logic          slot_empty,
  output logic [6:0]    free_pages,
  output logic          lut_miss,
  // CNN accelerator.
  input  logic          cnn_img_we,
  input  logic [1:0]    cnn_img_ch,
  input  logic [6:0]    cnn_img_row,
  input  logic [639:0]  cnn_img_data,
  input  logic          cnn_start,
  output logic          cnn_busy,
  output logic          cnn_done,
  output cnn_pkg::act_t cnn_score [2],
  output logic          cnn_is_ship
);
  tor_south_extension u_tor (
    .clk, .rst_n, .cfg_we, .cfg_idx, .cfg_mac, .cfg_valid,
    .s_valid, .s_ready, .s_data, .s_bytes, .s_last,
    .rx_valid, .rx_data, .rx_last,
    .m_valid, .m_data, .m_last, .m_useful, .slot_start, .slot, .vlan, .wavelength,
    .slot_empty, .free_pages, .lut_miss);

  cnn_accelerator u_cnn (
    .clk, .rst_n, .img_we(cnn_img_we), .img_ch(cnn_img_ch), .img_row(cnn_img_row),
    .img_data(cnn_img_data), .start(cnn_start), .busy(cnn_busy), .done(cnn_done),
    .score(cnn_score), .is_ship(cnn_is_ship));
endmodule
