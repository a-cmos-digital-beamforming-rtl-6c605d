// pa_dbf: prototype I, a 16-element, 4-beam digital phased-array receiver built
// with interleaved bit-stream processing (IL-BSP).
//
// Each of the 16 elements has a band-pass delta-sigma ADC (behavioural model).
// The ADC turns the 1 GHz IF input into a 4 GS/s 5-level bit stream. An interleaver
// halves the rate to 2 GS/s I/Q pairs, and a 2:1-MUX DDC moves them to baseband. All
// four beams share the 16 baseband streams. Each beam has 16 complex weight
// multipliers with 6-bit weights, an adder and a decimator. The decimator gives
// 13-bit quadrature samples at 125 MS/s (decimation by 16). Weights and ADC trims
// are loaded through the configuration port (address map in dbf_cfg_regs). The
// top-level structure, rates and widths follow the document. The configuration
// port, the CIC decimator and the reset values are this design's choices.
//
// Clocks: clk_adc is the 4 GHz sample clock. clk_dbf is clk_adc divided by two,
// with rising edges aligned. All beams decimate in lockstep, so one beam_valid
// pulse every 16 clk_dbf cycles marks new samples on every beam. rst_n is an
// asynchronous active-low reset.
module pa_dbf
  import dbf_pkg::*;
#(
  parameter int unsigned NE = N_ELEM,
  parameter int unsigned NB = N_BEAM,
  parameter int unsigned WW = 6,        // weight register width
  parameter int unsigned R  = 16,       // 2 GS/s -> 125 MS/s
  parameter int unsigned OW = 13,       // output sample width
  localparam int unsigned AW = 2 + ((NB > 1) ? $clog2(NB) : 1) + ((NE > 1) ? $clog2(NE) : 1)
) (
  input  logic                 clk_adc,
  input  logic                 clk_dbf,
  input  logic                 rst_n,
  input  logic signed [15:0]   rf_in [NE],     // sampled IF inputs, one per element
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
  logic [3:0]           dly [NB][NE];
  logic [2:0]           res_trim [NE];
  logic [2:0]           q_delay  [NE];
  bs_t                  adc_bs [NE];
  iq_bs_t               il [NE];
  iq_bs_t               bb [NE];
  logic                 lo;
  logic                 bvalid [NB];

  dbf_cfg_regs #(.NE(NE), .NB(NB), .WW(WW), .DSW(4), .HAS_DELAY(1'b0)) u_cfg (
    .clk(clk_dbf), .rst_n, .we(cfg_we), .addr(cfg_addr), .wdata(cfg_wdata),
    .rdata(cfg_rdata), .wc, .ws, .dly, .res_trim, .q_delay);

  // 2-level digital LO, shared by all DDCs
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
    dbf_beam #(.NE(NE), .WW(WW), .HAS_DDL(1'b0), .R(R), .OW(OW)) u_beam (
      .clk(clk_dbf), .rst_n, .bb, .wc(wc[b]), .ws(ws[b]), .dly(dly[b]),
      .out_i(beam_i[b]), .out_q(beam_q[b]), .out_valid(bvalid[b]));
  end

  assign beam_valid = bvalid[0];

endmodule
