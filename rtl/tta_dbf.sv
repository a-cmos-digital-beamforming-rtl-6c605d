// tta_dbf: prototype II, a 16-element, 4-beam true-time-delay digital beamforming
// receiver built with interleaved bit-stream processing (IL-BSP).
//
// The front end is the same as the phased array's: per element a band-pass
// delta-sigma ADC (behavioural model), an interleaver and a 2:1-MUX DDC. Each beam
// differs. Every element's baseband stream first passes a 16-level digital delay
// line: 0-15 samples of 500 ps, i.e. 0-7500 ps. This realizes the integer part of
// the element's true time delay. The complex weight multiplier, with 10-bit
// weights, then applies the carrier phase w_c*[k*tau] together with the small
// correction for the fractional delay that is left. The adder sums the elements,
// and the decimator reduces the beam by 8 to 250 MS/s. The document gives no
// output width. This design keeps the 17-bit beam-sum width (OW). The configuration
// port, the CIC decimator and the reset values are this design's choices.
//
// Clocks and reset are as in pa_dbf: clk_adc at 4 GHz, clk_dbf = clk_adc/2 with
// aligned rising edges, and an asynchronous active-low rst_n. beam_valid pulses
// every 8 clk_dbf cycles.
module tta_dbf
  import dbf_pkg::*;
#(
  parameter int unsigned NE    = N_ELEM,
  parameter int unsigned NB    = N_BEAM,
  parameter int unsigned WW    = 10,      // weight (coefficient) width
  parameter int unsigned DEPTH = 16,      // delay-line levels
  parameter int unsigned R     = 8,       // 2 GS/s -> 250 MS/s
  parameter int unsigned OW    = WW + 3 + $clog2(NE),
  localparam int unsigned AW   = 2 + ((NB > 1) ? $clog2(NB) : 1) + ((NE > 1) ? $clog2(NE) : 1),
  localparam int unsigned DSW  = $clog2(DEPTH)
) (
  input  logic                 clk_adc,
  input  logic                 clk_dbf,
  input  logic                 rst_n,
  input  logic signed [15:0]   rf_in [NE],
  input  logic                 cfg_we,
  input  logic [AW-1:0]        cfg_addr,
  input  logic [CFG_DW-1:0]    cfg_wdata,
  output logic [CFG_DW-1:0]    cfg_rdata,
  output logic signed [OW-1:0] beam_i [NB],
  output logic signed [OW-1:0] beam_q [NB],
  output logic                 beam_valid
);

  logic signed [WW-1:0] wc [NB][NE];
  logic signed [WW-1:0] ws [NB][NE];
  logic [DSW-1:0]       dly [NB][NE];
  logic [2:0]           res_trim [NE];
  logic [2:0]           q_delay  [NE];
  bs_t                  adc_bs [NE];
  iq_bs_t               il [NE];
  iq_bs_t               bb [NE];
  logic                 lo;
  logic                 bvalid [NB];

  dbf_cfg_regs #(.NE(NE), .NB(NB), .WW(WW), .DSW(DSW), .HAS_DELAY(1'b1)) u_cfg (
    .clk(clk_dbf), .rst_n, .we(cfg_we), .addr(cfg_addr), .wdata(cfg_wdata),
    .rdata(cfg_rdata), .wc, .ws, .dly, .res_trim, .q_delay);

  always_ff @(posedge clk_dbf or negedge rst_n)
    if (!rst_n) lo <= 1'b0;
    else        lo <= ~lo;

  for (genvar k = 0; k < NE; k++) begin : g_el
    ctbpdsm u_adc (
      .clk(clk_adc), .rst_n, .vin(rf_in[k]), .res_trim(res_trim[k]),
      .q_delay(q_delay[k]), .dout(adc_bs[k]));
    interleaver u_il (
      .clk_adc, .clk_dbf, .rst_n, .din(adc_bs[k]), .dout(il[k]));
    ddc u_ddc (
      .clk(clk_dbf), .rst_n, .lo, .din(il[k]), .dout(bb[k]));
  end

  for (genvar b = 0; b < NB; b++) begin : g_beam
    dbf_beam #(.NE(NE), .WW(WW), .HAS_DDL(1'b1), .DEPTH(DEPTH), .R(R), .OW(OW)) u_beam (
      .clk(clk_dbf), .rst_n, .bb, .wc(wc[b]), .ws(ws[b]), .dly(dly[b]),
      .out_i(beam_i[b]), .out_q(beam_q[b]), .out_valid(bvalid[b]));
  end

  assign beam_valid = bvalid[0];

endmodule
