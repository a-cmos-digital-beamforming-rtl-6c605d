// tb_ddl: drives a random stream and random delay settings, each held for a while
// and covering 0 and 15. Every output is checked against the input of 1 + sel
// cycles earlier (one fixed register plus the selected delay).
module tb_ddl;
  import dbf_pkg::*;

  logic clk = 0, rst_n = 0;
  iq_bs_t din = '0, dout;
  logic [3:0] sel = 0;
  int checks = 0, failures = 0;
  iq_bs_t hist [int];
  int seen [16];

  ddl dut (.clk, .rst_n, .din, .sel, .dout);

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 8000; t++) begin
      @(negedge clk);
      din.i = bs_t'(int'($urandom_range(4)) - 2);
      din.q = bs_t'(int'($urandom_range(4)) - 2);
      if (t % 40 == 0) sel = (t / 40 < 16) ? 4'(t / 40) : 4'($urandom_range(15));
      hist[t] = din;
      @(posedge clk); #0.1;
      if (t >= 16) begin
        checks++;
        seen[sel]++;
        if (dout !== hist[t - int'(sel)]) begin
          failures++;
          if (failures < 5) $display("t=%0d sel=%0d got %0d/%0d exp %0d/%0d", t, sel, dout.i, dout.q, hist[t-int'(sel)].i, hist[t-int'(sel)].q);
        end
      end
    end
    foreach (seen[d]) begin
      checks++;
      if (seen[d] == 0) begin failures++; $display("delay %0d never exercised", d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
