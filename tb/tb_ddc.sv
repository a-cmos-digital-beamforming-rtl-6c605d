// tb_ddc: applies random quadrature samples and LO phases and checks the
// registered output: for LO = +1 the I sample passes and Q is negated, for LO = -1
// the reverse.
module tb_ddc;
  import dbf_pkg::*;

  logic clk = 0, rst_n = 0, lo = 0;
  iq_bs_t din = '0, dout;
  int checks = 0, failures = 0;

  ddc dut (.clk, .rst_n, .lo, .din, .dout);

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ei, eq;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (1000) begin
      @(negedge clk);
      din.i = bs_t'(int'($urandom_range(4)) - 2);
      din.q = bs_t'(int'($urandom_range(4)) - 2);
      lo = 1'($urandom_range(1));
      ei = lo ? -int'(din.i) : int'(din.i);
      eq = lo ? int'(din.q) : -int'(din.q);
      @(posedge clk); #0.1;
      checks++;
      if (int'(dout.i) != ei || int'(dout.q) != eq) begin
        failures++;
        if (failures < 5) $display("lo=%0d got %0d %0d exp %0d %0d", lo, dout.i, dout.q, ei, eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
