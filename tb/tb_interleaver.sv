// tb_interleaver: feeds a random 5-level stream at the 4 GHz clock and checks
// that every 2 GHz output pair holds two consecutive samples: the earlier one on
// I, the later one on Q, with no sample lost or repeated.
module tb_interleaver;
  import dbf_pkg::*;

  logic clk_adc = 0, clk_dbf = 0, rst_n = 0;
  bs_t din = 0;
  iq_bs_t dout;
  int checks = 0, failures = 0;
  bs_t hist [int];
  int n = 0;

  interleaver dut (.clk_adc, .clk_dbf, .rst_n, .din, .dout);

  initial forever begin
    #1 clk_adc = 1; clk_dbf = ~clk_dbf;
    #1 clk_adc = 0;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk_adc);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk_adc);
    rst_n = 1;
    repeat (2000) begin
      @(negedge clk_adc);
      din = bs_t'(int'($urandom_range(4)) - 2);
      @(posedge clk_adc);
      hist[n] = din;
      if (clk_dbf && n >= 2) begin
        #0.1;
        checks++;
        if (dout.i !== hist[n-2] || dout.q !== hist[n-1]) begin
          failures++;
          if (failures < 5) $display("n=%0d got i=%0d q=%0d exp %0d %0d", n, dout.i, dout.q, hist[n-2], hist[n-1]);
        end
      end
      n++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
