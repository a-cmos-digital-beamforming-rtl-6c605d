// tb_cwm: random 5-level inputs and random weights, including the extreme weight
// codes, for the 6-bit (phased array) and 10-bit (timed array) widths. Each output
// is compared with the rotation I' = cI + sQ, Q' = -sI + cQ computed in integers.
module tb_cwm;
  import dbf_pkg::*;

  logic clk = 0, rst_n = 0;
  iq_bs_t din = '0;
  logic signed [5:0] wc6 = 0, ws6 = 0;
  logic signed [9:0] wc10 = 0, ws10 = 0;
  logic signed [8:0] oi6, oq6;
  logic signed [12:0] oi10, oq10;
  int checks = 0, failures = 0;

  cwm #(.W(6))  dut6  (.clk, .rst_n, .din, .wc(wc6),  .ws(ws6),  .dout_i(oi6),  .dout_q(oq6));
  cwm #(.W(10)) dut10 (.clk, .rst_n, .din, .wc(wc10), .ws(ws10), .dout_i(oi10), .dout_q(oq10));

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pick(int lo, int hi, int t);
    if (t % 7 == 0) return lo;
    if (t % 7 == 1) return hi;
    return lo + int'($urandom_range(hi - lo));
  endfunction

  initial begin
    int i, q, ei6, eq6, ei10, eq10;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      i = int'($urandom_range(4)) - 2;
      q = int'($urandom_range(4)) - 2;
      din.i = bs_t'(i); din.q = bs_t'(q);
      wc6 = 6'(pick(-32, 31, t));  ws6 = 6'(pick(-32, 31, t + 3));
      wc10 = 10'(pick(-512, 511, t)); ws10 = 10'(pick(-512, 511, t + 3));
      ei6  = int'(wc6) * i + int'(ws6) * q;
      eq6  = -int'(ws6) * i + int'(wc6) * q;
      ei10 = int'(wc10) * i + int'(ws10) * q;
      eq10 = -int'(ws10) * i + int'(wc10) * q;
      @(posedge clk); #0.1;
      checks++;
      if (int'(oi6) != ei6 || int'(oq6) != eq6) begin
        failures++;
        if (failures < 5) $display("W6 i=%0d q=%0d c=%0d s=%0d got %0d %0d exp %0d %0d", i, q, wc6, ws6, oi6, oq6, ei6, eq6);
      end
      checks++;
      if (int'(oi10) != ei10 || int'(oq10) != eq10) begin
        failures++;
        if (failures < 5) $display("W10 got %0d %0d exp %0d %0d", oi10, oq10, ei10, eq10);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
