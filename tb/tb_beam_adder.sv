// tb_beam_adder: random and extreme element values; the registered sum of all 16
// inputs is compared with an integer sum for both rails.
module tb_beam_adder;
  logic clk = 0, rst_n = 0;
  logic signed [8:0] in_i [16], in_q [16];
  logic signed [12:0] sum_i, sum_q;
  int checks = 0, failures = 0;

  beam_adder #(.N(16), .IW(9)) dut (.clk, .rst_n, .in_i, .in_q, .sum_i, .sum_q);

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ei, eq;
    foreach (in_i[k]) begin in_i[k] = 0; in_q[k] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      ei = 0; eq = 0;
      foreach (in_i[k]) begin
        if (t == 0)      begin in_i[k] = -9'sd128; in_q[k] = 9'sd128 - 9'sd1; end
        else if (t == 1) begin in_i[k] = 9'sd127;  in_q[k] = -9'sd128; end
        else begin
          in_i[k] = 9'(int'($urandom_range(511)) - 256);
          in_q[k] = 9'(int'($urandom_range(511)) - 256);
        end
        ei += int'(in_i[k]); eq += int'(in_q[k]);
      end
      @(posedge clk); #0.1;
      checks++;
      if (int'(sum_i) != ei || int'(sum_q) != eq) begin
        failures++;
        if (failures < 5) $display("got %0d %0d exp %0d %0d", sum_i, sum_q, ei, eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
