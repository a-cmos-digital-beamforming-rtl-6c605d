// interleaver: turns one element's 4 GS/s bit stream into a 2 GS/s quadrature
// pair, so that everything after it runs at half the ADC rate.
//
// Mixing with an fs/4 local oscillator makes every other sample of I and of Q
// zero. Per the document, the unit-delay-plus-2x-down-sampler that follows from
// this is moved in front of the beamformer. The even-numbered samples become I
// and the odd-numbered ones Q. Two flops on the ADC clock hold the two most recent
// samples. On each rising edge of the 2 GHz clock, the earlier sample goes to I
// and the later to Q. clk_dbf must be clk_adc divided by two, with its rising
// edges on rising edges of clk_adc. That sample pairing, and the register on the
// output, are this design's choices. Latency: a sample reaches dout at most three
// clk_adc edges after the ADC drives it.
module interleaver
  import dbf_pkg::*;
(
  input  logic   clk_adc,   // 4 GHz bit-stream clock
  input  logic   clk_dbf,   // 2 GHz beamformer clock, rising edges aligned
  input  logic   rst_n,
  input  bs_t    din,       // 4 GS/s bit stream
  output iq_bs_t dout       // 2 GS/s pair: i = even sample, q = odd sample
);

  bs_t s_new, s_old;

  always_ff @(posedge clk_adc or negedge rst_n) begin
    if (!rst_n) begin
      s_new <= '0;
      s_old <= '0;
    end else begin
      s_new <= din;
      s_old <= s_new;       // the z^-1 that aligns the even sample with the odd one
    end
  end

  always_ff @(posedge clk_dbf or negedge rst_n) begin
    if (!rst_n) dout <= '0;
    else begin
      dout.i <= s_old;
      dout.q <= s_new;
    end
  end

endmodule
