// ctbpdsm: behavioural model (not synthesizable hardware) of the 4th-order
// continuous-time band-pass delta-sigma modulator that digitizes each element's
// 1 GHz IF input at 4 GS/s into a 5-level bit stream.
//
// The real part is analog: two single-op-amp RC resonators, a passive summer,
// a 5-level offset-calibrated quantizer and return-to-zero feedback DACs. This
// model keeps only its sampled-data behaviour. It is an error-feedback loop whose
// noise transfer function is NTF(z) = (1 + a z^-1 + z^-2)^2, with two zero pairs at
// fs/4 as the document places them. The signal passes with unit gain. The 3-bit
// resonator trim moves the zeros. Code 4 is the nominal setting and puts them at
// exactly fs/4. The coefficient a = (res_trim - 4)/32 is this model's own choice.
// The 3-bit quantizer sampling-delay trim is accepted but has no effect: the model
// assumes a loop delay that is already tuned.
//
// Interface: vin is the IF input sampled once per clk cycle, in units where one
// quantizer step is dbf_pkg::ADC_STEP. The loop stays stable for |vin| up to
// about one step. dout is registered on the rising clk edge. The model uses
// integer arithmetic only, with a width wide enough that nothing wraps.
module ctbpdsm
  import dbf_pkg::*;
(
  input  logic               clk,       // 4 GS/s sample clock
  input  logic               rst_n,
  input  logic signed [15:0] vin,       // sampled IF input
  input  logic        [2:0]  res_trim,  // resonator centre-frequency trim (3 bit)
  input  logic        [2:0]  q_delay,   // quantizer sampling-time trim (3 bit)
  output bs_t                dout       // 5-level bit stream
);

  localparam int HALF = ADC_STEP / 2;

  // e_d[k] holds the quantization error of k+1 samples ago
  logic signed [31:0] e_d [4];
  logic signed [31:0] w, e_now, a_q, fb;
  logic signed [31:0] y_lvl;

  always_comb begin
    a_q = 32'(signed'({1'b0, res_trim})) - 32'sd4;
    // feedback of past errors: 2a e1 + (a^2 + 2) e2 + 2a e3 + e4
    fb = ((a_q * e_d[0]) >>> 4)
       + ((a_q * a_q * e_d[1]) >>> 10) + (e_d[1] <<< 1)
       + ((a_q * e_d[2]) >>> 4)
       + e_d[3];
    w = 32'(vin) + fb;
    y_lvl = (w + HALF) >>> 13;          // round to nearest level (ADC_STEP = 2^13)
    if (y_lvl > 2)  y_lvl = 2;
    if (y_lvl < -2) y_lvl = -2;
    e_now = y_lvl * ADC_STEP - w;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout <= '0;
      for (int k = 0; k < 4; k++) e_d[k] <= '0;
    end else begin
      dout   <= bs_t'(y_lvl);
      e_d[0] <= e_now;
      for (int k = 1; k < 4; k++) e_d[k] <= e_d[k-1];
    end
  end

  wire unused_q_delay = ^q_delay;

endmodule
