// cic_decimator: per-beam decimation filter from the 2 GS/s beam to the output rate.
//
// The document puts one decimator after each beam adder. Prototype I outputs
// 13-bit samples at 125 MS/s (decimation by 16); prototype II outputs 250 MS/s
// (decimation by 8). It does not give the filter. This design uses a cascaded
// integrator-comb filter of order ORDER (default 3, one above the 2nd-order
// baseband noise shaping left after down-mixing), with differential delay 1.
// ORDER integrators run at the input rate with modular arithmetic of
// GW = IW + ORDER*log2(R) bits. Every R-th cycle the last integrator is sampled
// into ORDER comb stages. The DC gain R^ORDER is removed by keeping the top OW bits
// (truncation). With OW = IW the output keeps the input's scale.
//
// Timing: one input sample per clock on in_i/in_q. out_valid pulses for one
// cycle every R cycles, and out_i/out_q hold their value until the next pulse.
module cic_decimator #(
  parameter int unsigned IW    = 13,
  parameter int unsigned R     = 16,     // decimation ratio, a power of two
  parameter int unsigned ORDER = 3,
  parameter int unsigned OW    = 13,
  localparam int unsigned GW   = IW + ORDER * $clog2(R)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [IW-1:0] in_i,
  input  logic signed [IW-1:0] in_q,
  output logic signed [OW-1:0] out_i,
  output logic signed [OW-1:0] out_q,
  output logic                 out_valid
);

  typedef logic signed [GW-1:0] acc_t;

  logic [$clog2(R)-1:0] phase;
  acc_t integ [2][ORDER];         // [rail][stage]
  acc_t comb_d [2][ORDER];        // previous comb-stage inputs
  acc_t comb_v [2][ORDER+1];      // comb chain values at a decimation instant
  logic dec_en;

  assign dec_en = (phase == $clog2(R)'(R - 1));

  always_comb begin
    for (int r = 0; r < 2; r++) begin
      comb_v[r][0] = integ[r][ORDER-1];
      for (int s = 0; s < ORDER; s++)
        comb_v[r][s+1] = comb_v[r][s] - comb_d[r][s];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      out_i     <= '0;
      out_q     <= '0;
      out_valid <= 1'b0;
      for (int r = 0; r < 2; r++)
        for (int s = 0; s < ORDER; s++) begin
          integ[r][s]  <= '0;
          comb_d[r][s] <= '0;
        end
    end else begin
      phase <= phase + 1'b1;
      integ[0][0] <= integ[0][0] + acc_t'(in_i);
      integ[1][0] <= integ[1][0] + acc_t'(in_q);
      for (int r = 0; r < 2; r++)
        for (int s = 1; s < ORDER; s++)
          integ[r][s] <= integ[r][s] + integ[r][s-1];
      out_valid <= dec_en;
      if (dec_en) begin
        for (int r = 0; r < 2; r++)
          for (int s = 0; s < ORDER; s++)
            comb_d[r][s] <= comb_v[r][s];
        out_i <= OW'(comb_v[0][ORDER] >>> (GW - OW));
        out_q <= OW'(comb_v[1][ORDER] >>> (GW - OW));
      end
    end
  end

endmodule
