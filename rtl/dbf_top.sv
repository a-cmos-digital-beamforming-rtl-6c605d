// dbf_top: the two beamforming receivers side by side.
//
// The phased array (pa_dbf, prototype I) and the true-time-delay array (tta_dbf,
// prototype II) are separate chips that share their front-end architecture. Each
// keeps its own ports here: 16 sampled IF inputs, a configuration port, and four
// quadrature beam outputs with a valid strobe. Both run from the same pair of
// clocks: clk_adc at 4 GHz, and clk_dbf = clk_adc/2 with aligned rising edges.
// All sizes are the document's: 16 elements and 4 beams each, 6-bit weights and
// 13-bit 125 MS/s beams for the phased array, 10-bit weights, 0-7500 ps delay and
// 250 MS/s beams for the timed array.
module dbf_top
  import dbf_pkg::*;
(
  input  logic               clk_adc,
  input  logic               clk_dbf,
  input  logic               rst_n,
  // prototype I: phased array
  input  logic signed [15:0] pa_rf_in [N_ELEM],
  input  logic               pa_cfg_we,
  input  logic [7:0]         pa_cfg_addr,
  input  logic [CFG_DW-1:0]  pa_cfg_wdata,
  output logic [CFG_DW-1:0]  pa_cfg_rdata,
  output logic signed [12:0] pa_beam_i [N_BEAM],
  output logic signed [12:0] pa_beam_q [N_BEAM],
  output logic               pa_beam_valid,
  // prototype II: true-time-delay array
  input  logic signed [15:0] tta_rf_in [N_ELEM],
  input  logic               tta_cfg_we,
  input  logic [7:0]         tta_cfg_addr,
  input  logic [CFG_DW-1:0]  tta_cfg_wdata,
  output logic [CFG_DW-1:0]  tta_cfg_rdata,
  output logic signed [16:0] tta_beam_i [N_BEAM],
  output logic signed [16:0] tta_beam_q [N_BEAM],
  output logic               tta_beam_valid
);

  pa_dbf u_pa (
    .clk_adc, .clk_dbf, .rst_n, .rf_in(pa_rf_in),
    .cfg_we(pa_cfg_we), .cfg_addr(pa_cfg_addr), .cfg_wdata(pa_cfg_wdata),
    .cfg_rdata(pa_cfg_rdata), .beam_i(pa_beam_i), .beam_q(pa_beam_q),
    .beam_valid(pa_beam_valid));

  tta_dbf u_tta (
    .clk_adc, .clk_dbf, .rst_n, .rf_in(tta_rf_in),
    .cfg_we(tta_cfg_we), .cfg_addr(tta_cfg_addr), .cfg_wdata(tta_cfg_wdata),
    .cfg_rdata(tta_cfg_rdata), .beam_i(tta_beam_i), .beam_q(tta_beam_q),
    .beam_valid(tta_beam_valid));

endmodule
