// tb_ctbpdsm: checks the behavioural band-pass modulator against an independent
// floating-point evaluation of the same error-feedback loop, for the nominal
// resonator trim and for a detuned one. It also checks that an fs/4 tone is
// recovered from the bit stream with the expected amplitude, and that the 5-level
// output stays legal.
module tb_ctbpdsm;
  import dbf_pkg::*;

  logic clk = 0, rst_n = 0;
  logic signed [15:0] vin = 0;
  logic [2:0] res_trim = 3'd4, q_delay = 3'd4;
  bs_t dout;
  int checks = 0, failures = 0;

  ctbpdsm dut (.clk, .rst_n, .vin, .res_trim, .q_delay, .dout);

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real e_hist [4];
  real pi = 3.14159265358979;

  // one step of the reference loop: returns the level, updates the error history
  function automatic int ref_step(real u, int aq);
    real w, y, e;
    w = u + $floor(aq * e_hist[0] / 16.0) + $floor(aq * aq * e_hist[1] / 1024.0)
          + 2.0 * e_hist[1] + $floor(aq * e_hist[2] / 16.0) + e_hist[3];
    y = $floor((w + 4096.0) / 8192.0);
    if (y > 2.0) y = 2.0;
    if (y < -2.0) y = -2.0;
    e = y * 8192.0 - w;
    e_hist[3] = e_hist[2]; e_hist[2] = e_hist[1]; e_hist[1] = e_hist[0]; e_hist[0] = e;
    return int'(y);
  endfunction

  task automatic run_tone(int trim, real amp, int n, output real i_acc, output real q_acc);
    int exp_y;
    int mism = 0, illegal = 0;
    rst_n = 0;
    res_trim = 3'(trim);
    for (int k = 0; k < 4; k++) e_hist[k] = 0.0;
    i_acc = 0.0; q_acc = 0.0;
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < n; t++) begin
      vin = 16'(int'($floor(amp * 8192.0 * $cos(pi * t / 2.0 + 0.3) + 0.5)));
      @(posedge clk); #0.1;
      exp_y = ref_step(real'(vin), trim - 4);
      if (int'(dout) != exp_y) mism++;
      if (!bs_legal(dout)) illegal++;
      // demodulate at fs/4: cos(pi t/2) and sin(pi t/2)
      i_acc += real'(dout) * $cos(pi * t / 2.0);
      q_acc += real'(dout) * $sin(pi * t / 2.0);
      @(negedge clk);
    end
    checks++; if (mism != 0) begin failures++; $display("trim %0d: %0d samples differ from reference", trim, mism); end
    checks++; if (illegal != 0) begin failures++; $display("trim %0d: %0d illegal levels", trim, illegal); end
  endtask

  initial begin
    real ia, qa, amp_est;
    run_tone(4, 0.8, 4000, ia, qa);
    // the tone cos(pi t/2 + 0.3) demodulates to amplitude 0.8 (I = 0.4 cos 0.3 per sample ...)
    amp_est = 2.0 * $sqrt(ia * ia + qa * qa) / 4000.0;
    checks++;
    if (amp_est < 0.78 || amp_est > 0.82) begin
      failures++; $display("recovered tone amplitude %f, expected 0.8", amp_est);
    end
    run_tone(0, 0.8, 2000, ia, qa);
    run_tone(7, 0.5, 2000, ia, qa);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
