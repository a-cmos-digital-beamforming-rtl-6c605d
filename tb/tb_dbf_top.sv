// tb_dbf_top: end-to-end test of both receivers together, at full size with the
// top's default parameters.
//
// Phased array: a 1.006 GHz tone from +20 degrees. Beam 0 is steered to +20, beam 1
// to -40, beam 2 has two lobes (+20 and -40, averaged weights) and beam 3 uses
// element 0 alone. Timed array: a 1.04 GHz tone from 90 degrees. Beam 0 is the
// true-time-delay beam, beam 1 the phase-only beam, beam 2 is steered to 0 degrees
// and beam 3 uses element 0 alone. Beyond the beam-power checks, the test counts
// how often each mechanism of the design occurred, and fails any that never did:
// configuration writes and read-backs, both LO phases, the outer quantizer levels
// (+-2), non-zero delay-line settings, and the output strobes of both decimators at
// their own rates.
module tb_dbf_top;
  import dbf_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam real FS = 4.0e9;
  localparam real AMP = 0.6;

  logic clk_adc = 0, clk_dbf = 0, rst_n = 0;
  logic signed [15:0] pa_rf_in [16], tta_rf_in [16];
  logic pa_cfg_we = 0, tta_cfg_we = 0;
  logic [7:0] pa_cfg_addr = 0, tta_cfg_addr = 0;
  logic [CFG_DW-1:0] pa_cfg_wdata = 0, tta_cfg_wdata = 0, pa_cfg_rdata, tta_cfg_rdata;
  logic signed [12:0] pa_beam_i [4], pa_beam_q [4];
  logic signed [16:0] tta_beam_i [4], tta_beam_q [4];
  logic pa_beam_valid, tta_beam_valid;
  int checks = 0, failures = 0;

  dbf_top dut (.*);

  initial forever begin
    #0.125 clk_adc = 1; clk_dbf = ~clk_dbf;
    #0.125 clk_adc = 0;
  end

  initial begin : watchdog
    #6000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int n_cfg_wr = 0, n_cfg_rd = 0, n_lo [2], n_q2 = 0, n_dly_nz = 0, n_pa_out = 0, n_tta_out = 0;
  int pa_space_bad = 0, tta_space_bad = 0;

  task automatic wr(bit tta, int f, int b, int e, int d);
    @(negedge clk_dbf);
    if (tta) begin tta_cfg_we = 1; tta_cfg_addr = 8'((f << 6) | (b << 4) | e); tta_cfg_wdata = CFG_DW'(d); end
    else     begin pa_cfg_we = 1;  pa_cfg_addr  = 8'((f << 6) | (b << 4) | e); pa_cfg_wdata  = CFG_DW'(d); end
    n_cfg_wr++;
    if (tta && f == FLD_DELAY && d != 0) n_dly_nz++;
    @(negedge clk_dbf);
    pa_cfg_we = 0; tta_cfg_we = 0;
  endtask

  function automatic int rnd(real v); return int'($floor(v + 0.5)); endfunction

  task automatic steer(bit tta, int b, real deg, logic use_delay);
    real sg, ph;
    real m;
    m = tta ? 511.0 : 31.0;
    sg = $sin(deg * PI / 180.0);
    for (int k = 0; k < 16; k++) begin
      ph = PI * k * sg;
      wr(tta, FLD_COS, b, k, rnd(m * $cos(ph)));
      wr(tta, FLD_SIN, b, k, rnd(-m * $sin(ph)));
      if (tta) wr(1, FLD_DELAY, b, k,
                  !use_delay ? 0 : (sg > 0.0) ? rnd((15 - k) * sg) : rnd(-k * sg));
    end
  endtask

  task automatic two_lobe(int b, real d1, real d2);
    real p1, p2;
    for (int k = 0; k < 16; k++) begin
      p1 = PI * k * $sin(d1 * PI / 180.0); p2 = PI * k * $sin(d2 * PI / 180.0);
      wr(0, FLD_COS, b, k, rnd(31.0 * ($cos(p1) + $cos(p2)) / 2.0));
      wr(0, FLD_SIN, b, k, rnd(-31.0 * ($sin(p1) + $sin(p2)) / 2.0));
    end
  endtask

  task automatic single(bit tta, int b);
    for (int k = 0; k < 16; k++) begin
      wr(tta, FLD_COS, b, k, (k == 0) ? (tta ? 511 : 31) : 0);
      wr(tta, FLD_SIN, b, k, 0);
      if (tta) wr(1, FLD_DELAY, b, k, 0);
    end
  endtask

  // stimuli
  longint n_s = 0;
  always @(negedge clk_adc) begin
    for (int k = 0; k < 16; k++) begin
      pa_rf_in[k] <= 16'(rnd(AMP * ADC_STEP *
          $cos(2.0 * PI * 1.006e9 * n_s / FS - PI * k * $sin(20.0 * PI / 180.0))));
      tta_rf_in[k] <= 16'(rnd(AMP * ADC_STEP * $cos(2.0 * PI * 1.04e9 * real'(n_s - 2 * k) / FS)));
    end
    n_s <= n_s + 1;
  end

  // observers
  real pa_pw [4], tta_pw [4];
  logic measuring = 0;
  int t_dbf = 0, pa_last = -1, tta_last = -1;
  always @(posedge clk_dbf) begin
    t_dbf <= t_dbf + 1;
    if (rst_n) begin
      n_lo[dut.u_pa.lo]++;
      if (dut.u_pa.g_el[3].u_adc.dout == 3'sd2 || dut.u_tta.g_el[9].u_adc.dout == -3'sd2) n_q2++;
      if (pa_beam_valid) begin
        n_pa_out++;
        if (pa_last >= 0 && t_dbf - pa_last != 16) pa_space_bad++;
        pa_last = t_dbf;
        if (measuring) foreach (pa_pw[b]) pa_pw[b] += real'(pa_beam_i[b]) ** 2 + real'(pa_beam_q[b]) ** 2;
      end
      if (tta_beam_valid) begin
        n_tta_out++;
        if (tta_last >= 0 && t_dbf - tta_last != 8) tta_space_bad++;
        tta_last = t_dbf;
        if (measuring) foreach (tta_pw[b]) tta_pw[b] += real'(tta_beam_i[b]) ** 2 + real'(tta_beam_q[b]) ** 2;
      end
    end
  end

  initial begin
    real ph, expected;
    n_lo[0] = 0; n_lo[1] = 0;
    foreach (pa_pw[b]) begin pa_pw[b] = 0.0; tta_pw[b] = 0.0; end
    repeat (4) @(negedge clk_dbf);
    rst_n = 1;
    steer(0, 0, 20.0, 1'b0);
    steer(0, 1, -40.0, 1'b0);
    two_lobe(2, 20.0, -40.0);
    single(0, 3);
    steer(1, 0, 90.0, 1'b1);
    steer(1, 1, 90.0, 1'b0);
    steer(1, 2, 0.0, 1'b1);
    single(1, 3);
    for (int k = 0; k < 16; k++) begin
      wr(0, FLD_TRIM, 0, k, 36);
      wr(1, FLD_TRIM, 0, k, 36);
    end
    // read back the TTA delays of beam 0
    for (int k = 0; k < 16; k++) begin
      @(negedge clk_dbf);
      tta_cfg_addr = 8'((FLD_DELAY << 6) | k);
      pa_cfg_addr = 8'((FLD_SIN << 6) | (1 << 4) | k);
      #0.01;
      ph = PI * k * $sin(-40.0 * PI / 180.0);
      chk(tta_cfg_rdata == CFG_DW'(15 - k) && pa_cfg_rdata[5:0] == 6'(rnd(-31.0 * $sin(ph))),
          $sformatf("read-back element %0d", k));
      n_cfg_rd++;
    end
    repeat (30 * 16) @(posedge clk_dbf);
    measuring = 1;
    repeat (100 * 16) @(posedge clk_dbf);
    measuring = 0;
    // beam-power checks
    $display("PA:  gain %.1f, off-beam %.4f, two-lobe %.3f", pa_pw[0] / pa_pw[3], pa_pw[1] / pa_pw[0], pa_pw[2] / pa_pw[0]);
    $display("TTA: gain %.1f, phase-only %.3f, off-beam %.4f", tta_pw[0] / tta_pw[3], tta_pw[1] / tta_pw[0], tta_pw[2] / tta_pw[0]);
    chk(pa_pw[0] / pa_pw[3] > 180.0 && pa_pw[0] / pa_pw[3] < 330.0, "PA array gain");
    chk(pa_pw[1] / pa_pw[0] < 0.05, "PA rejection");
    chk(pa_pw[2] / pa_pw[0] > 0.15 && pa_pw[2] / pa_pw[0] < 0.40, "PA two-lobe beam");
    chk(tta_pw[0] / tta_pw[3] > 180.0 && tta_pw[0] / tta_pw[3] < 330.0, "TTA array gain");
    // phase-only array factor at 40 MHz offset: |sum exp(j pi k 0.04)|^2 / 256
    expected = ($sin(16.0 * PI * 0.02) / (16.0 * $sin(PI * 0.02))) ** 2;
    chk(tta_pw[1] / tta_pw[0] > expected - 0.1 && tta_pw[1] / tta_pw[0] < expected + 0.1, "TTA squint of phase-only beam");
    chk(tta_pw[2] / tta_pw[0] < 0.05, "TTA rejection");
    chk(pa_space_bad == 0 && tta_space_bad == 0, "decimator output spacing");
    // mechanism coverage
    $display("mechanisms: cfg writes %0d, read-backs %0d, LO +1 %0d, LO -1 %0d, outer levels %0d, nonzero delays %0d, PA outputs %0d, TTA outputs %0d",
             n_cfg_wr, n_cfg_rd, n_lo[0], n_lo[1], n_q2, n_dly_nz, n_pa_out, n_tta_out);
    chk(n_cfg_wr > 0, "configuration write happened");
    chk(n_cfg_rd > 0, "configuration read-back happened");
    chk(n_lo[0] > 0 && n_lo[1] > 0, "both LO phases happened");
    chk(n_q2 > 0, "outer quantizer levels happened");
    chk(n_dly_nz > 0, "non-zero delay-line setting happened");
    chk(n_pa_out > 100, "phased-array decimator outputs happened");
    chk(n_tta_out > 2 * 100, "timed-array decimator outputs happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
