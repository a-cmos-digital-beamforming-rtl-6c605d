// ddc: digital down-conversion of an interleaved element stream to baseband.
//
// Once the interleaver has dropped the zero samples of the fs/4 local
// oscillator, the LO reduces to a 2-level sequence (+1, -1). Following the
// document, the down-conversion is then a 2:1 multiplexer per rail that picks
// either the sample or its negation. With x = I cos(wt) - Q sin(wt), the even
// samples are multiplied by cos = (+1,-1,...) and the odd ones by -sin =
// (-1,+1,...). So for lo = 0, I passes and Q is negated, and for lo = 1 the reverse.
// The product stays 5-level. The caller toggles lo every clk_dbf cycle. The
// output register, giving one cycle of latency, is this design's choice.
module ddc
  import dbf_pkg::*;
(
  input  logic   clk,       // 2 GHz beamformer clock
  input  logic   rst_n,
  input  logic   lo,        // 2-level LO: 0 = +1, 1 = -1
  input  iq_bs_t din,
  output iq_bs_t dout
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout <= '0;
    else begin
      dout.i <= bs_neg(din.i, lo);
      dout.q <= bs_neg(din.q, ~lo);
    end
  end

endmodule
