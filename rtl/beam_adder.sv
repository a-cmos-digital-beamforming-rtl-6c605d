// beam_adder: adds the N phase-shifted element streams into one quadrature beam.
//
// One adder per beam and rail sums the N CWM outputs every 2 GHz cycle. The sum
// grows by clog2(N) bits, so it cannot overflow: 13 bits for 16 elements with 6-bit
// weights, 17 bits with 10-bit weights. The result is registered, giving one cycle
// of latency. The document shows the adder only as a block. Writing it as one
// combinational sum with a single output register is this design's choice; a
// 2 GHz implementation would pipeline the tree.
module beam_adder #(
  parameter int unsigned N  = 16,
  parameter int unsigned IW = 9,
  localparam int unsigned OW = IW + $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [IW-1:0] in_i [N],
  input  logic signed [IW-1:0] in_q [N],
  output logic signed [OW-1:0] sum_i,
  output logic signed [OW-1:0] sum_q
);

  logic signed [OW-1:0] acc_i, acc_q;

  always_comb begin
    acc_i = '0;
    acc_q = '0;
    for (int k = 0; k < N; k++) begin
      acc_i += OW'(in_i[k]);
      acc_q += OW'(in_q[k]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_i <= '0;
      sum_q <= '0;
    end else begin
      sum_i <= acc_i;
      sum_q <= acc_q;
    end
  end

endmodule
