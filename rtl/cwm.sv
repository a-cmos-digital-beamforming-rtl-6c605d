// cwm: complex weight multiplication of one element's baseband bit stream.
//
// Implements I' = c*I + s*Q and Q' = -s*I + c*Q (the document's rotation by the
// element's phase weight). Because I and Q take only the five values
// -2..2, each product is a 5:1 multiplexer, selected by the bit-stream sample,
// over {-2w, -w, 0, w, 2w}. No multiplier is needed. The weights are W-bit two's
// complement. W is 6 in the phased array and 10 in the timed array. The products
// are W+2 bits and each output sum is W+3 bits, so nothing overflows. The output is
// registered: one clock cycle of latency, one sample per cycle. An assertion
// checks that the inputs are legal 5-level samples.
module cwm
  import dbf_pkg::*;
#(
  parameter int unsigned W = 6          // weight width
) (
  input  logic                clk,
  input  logic                rst_n,
  input  iq_bs_t              din,      // down-converted element sample
  input  logic signed [W-1:0] wc,       // cos weight
  input  logic signed [W-1:0] ws,       // sin weight
  output logic signed [W+2:0] dout_i,
  output logic signed [W+2:0] dout_q
);

  typedef logic signed [W+1:0] prod_t;

  // 5:1 MUX: the bit-stream sample selects a multiple of the weight
  function automatic prod_t mux5(bs_t sel, logic signed [W-1:0] wt);
    prod_t w1, w2;
    w1 = prod_t'(wt);
    w2 = prod_t'(wt) <<< 1;
    unique case (sel)
      -3'sd2:  return -w2;
      -3'sd1:  return -w1;
       3'sd1:  return  w1;
       3'sd2:  return  w2;
      default: return '0;
    endcase
  endfunction

  prod_t ci, sq, si, cq;

  always_comb begin
    ci = mux5(din.i, wc);
    sq = mux5(din.q, ws);
    si = mux5(din.i, ws);
    cq = mux5(din.q, wc);
  end

  // the multiplexers cover only the five legal levels
  always_comb
    if (rst_n)
      a_legal_levels: assert (bs_legal(din.i) && bs_legal(din.q))
        else $error("cwm: bit-stream sample outside -2..2");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout_i <= '0;
      dout_q <= '0;
    end else begin
      dout_i <= (W+3)'(ci) + (W+3)'(sq);
      dout_q <= (W+3)'(cq) - (W+3)'(si);
    end
  end

endmodule
