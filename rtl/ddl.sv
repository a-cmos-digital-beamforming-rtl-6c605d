// ddl: 16-level digital delay line for the true-time-delay beamformer.
//
// It delays one element's baseband quadrature bit stream by 0 to DEPTH-1 samples.
// At 2 GS/s one sample is 500 ps, so the default DEPTH of 16 spans 0-7500 ps, the
// range the document gives. A chain of DEPTH-1 registers holds past samples, and a
// DEPTH:1 multiplexer picks the tap that sel names. A registered output adds one
// fixed cycle to every setting: the total latency is 1 + sel cycles. Only the
// relative delay between elements matters. The shift-register-plus-multiplexer
// structure is this design's choice; the document gives only the depth and
// resolution.
module ddl
  import dbf_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  localparam int unsigned SW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  iq_bs_t        din,
  input  logic [SW-1:0] sel,      // delay in samples (500 ps each)
  output iq_bs_t        dout
);

  iq_bs_t sr [DEPTH-1];           // sr[d] = input delayed by d+1 samples
  iq_bs_t tap;

  always_comb tap = (sel == '0) ? din : sr[sel - SW'(1)];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < DEPTH-1; d++) sr[d] <= '0;
      dout <= '0;
    end else begin
      sr[0] <= din;
      for (int d = 1; d < DEPTH-1; d++) sr[d] <= sr[d-1];
      dout <= tap;
    end
  end

endmodule
