// tb_pa_dbf: end-to-end test of the phased-array receiver at its full size.
//
// Sixteen IF inputs carry a 1.006 GHz tone arriving from +30 degrees on a
// half-wavelength line array (element k lags by pi*k*sin(30deg)). The four beams
// are programmed as follows. Beam 0 is steered to +30 deg. Beam 1 is steered to
// -30 deg. Beam 2 has two main lobes, +30 and -60 deg, made by averaging the two
// weight sets. Beam 3 uses element 0 alone. The checks: the array gain of beam 0
// over beam 3 (ideally 16^2 in power), the rejection of beam 1, the half-amplitude
// response of the two-lobe beam, beam 0's absolute amplitude (16 x 31 x input
// amplitude), the 16-cycle output spacing (125 MS/s), and the register read-back.
module tb_pa_dbf;
  import dbf_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam real FS = 4.0e9;
  localparam real AMP = 0.5;                 // input amplitude in quantizer steps

  logic clk_adc = 0, clk_dbf = 0, rst_n = 0;
  logic signed [15:0] rf_in [16];
  logic cfg_we = 0;
  logic [7:0] cfg_addr = 0;
  logic [CFG_DW-1:0] cfg_wdata = 0, cfg_rdata;
  logic signed [12:0] beam_i [4], beam_q [4];
  logic beam_valid;
  int checks = 0, failures = 0;

  pa_dbf dut (.clk_adc, .clk_dbf, .rst_n, .rf_in, .cfg_we, .cfg_addr, .cfg_wdata,
              .cfg_rdata, .beam_i, .beam_q, .beam_valid);

  initial forever begin
    #0.125 clk_adc = 1; clk_dbf = ~clk_dbf;
    #0.125 clk_adc = 0;
  end

  initial begin : watchdog
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(int f, int b, int e, int d);
    @(negedge clk_dbf);
    cfg_we = 1; cfg_addr = 8'((f << 6) | (b << 4) | e); wdata_set(d);
    @(negedge clk_dbf);
    cfg_we = 0;
  endtask
  task automatic wdata_set(int d); cfg_wdata = CFG_DW'(d); endtask

  function automatic real steer_phase(real deg, int k);
    return PI * k * $sin(deg * PI / 180.0);
  endfunction

  // input generator: one sample per clk_adc cycle
  real src_deg = 30.0;
  real f_in = 1.006e9;
  longint n_s = 0;
  always @(negedge clk_adc) begin
    for (int k = 0; k < 16; k++)
      rf_in[k] <= 16'(int'($floor(AMP * ADC_STEP *
                   $cos(2.0 * PI * f_in * n_s / FS - steer_phase(src_deg, k)) + 0.5)));
    n_s <= n_s + 1;
  end

  real pw [4];
  real amp0_sum;
  int nout = 0, last_t = -1, t_dbf = 0;
  logic measuring = 0;

  always @(posedge clk_dbf) t_dbf <= t_dbf + 1;

  always @(posedge clk_dbf) if (rst_n && beam_valid) begin
    if (last_t >= 0 && t_dbf - last_t != 16) begin
      failures++; $display("FAIL: output spacing %0d cycles", t_dbf - last_t);
    end
    last_t = t_dbf;
    if (measuring) begin
      for (int b = 0; b < 4; b++) pw[b] += real'(beam_i[b]) ** 2 + real'(beam_q[b]) ** 2;
      amp0_sum += $sqrt(real'(beam_i[0]) ** 2 + real'(beam_q[0]) ** 2);
      nout++;
    end
  end

  initial begin
    int c, s, rb_ok;
    real ph, ph2, r30, r1, r2, amp0;
    foreach (rf_in[k]) rf_in[k] = 0;
    foreach (pw[b]) pw[b] = 0.0;
    amp0_sum = 0.0;
    repeat (4) @(negedge clk_dbf);
    rst_n = 1;
    for (int k = 0; k < 16; k++) begin
      wr(FLD_TRIM, 0, k, (4 << 3) | 4);
      // beam 0: +30 deg
      ph = steer_phase(30.0, k);
      wr(FLD_COS, 0, k, int'($floor(31.0 * $cos(ph) + 0.5)));
      wr(FLD_SIN, 0, k, int'($floor(-31.0 * $sin(ph) + 0.5)));
      // beam 1: -30 deg
      ph = steer_phase(-30.0, k);
      wr(FLD_COS, 1, k, int'($floor(31.0 * $cos(ph) + 0.5)));
      wr(FLD_SIN, 1, k, int'($floor(-31.0 * $sin(ph) + 0.5)));
      // beam 2: average of the +30 and -60 deg weight sets (two main lobes)
      ph = steer_phase(30.0, k); ph2 = steer_phase(-60.0, k);
      wr(FLD_COS, 2, k, int'($floor(31.0 * ($cos(ph) + $cos(ph2)) / 2.0 + 0.5)));
      wr(FLD_SIN, 2, k, int'($floor(-31.0 * ($sin(ph) + $sin(ph2)) / 2.0 + 0.5)));
      // beam 3: element 0 only
      wr(FLD_COS, 3, k, (k == 0) ? 31 : 0);
      wr(FLD_SIN, 3, k, 0);
    end
    // read-back of a few registers
    rb_ok = 1;
    for (int k = 0; k < 16; k += 5) begin
      @(negedge clk_dbf);
      cfg_addr = 8'((FLD_COS << 6) | (0 << 4) | k);
      #0.01;
      c = int'($floor(31.0 * $cos(steer_phase(30.0, k)) + 0.5));
      if (cfg_rdata[5:0] != 6'(c)) rb_ok = 0;
      cfg_addr = 8'((FLD_TRIM << 6) | k);
      #0.01;
      if (cfg_rdata != CFG_DW'(36)) rb_ok = 0;
    end
    chk(rb_ok == 1, "register read-back");
    // let the CIC settle, then measure
    repeat (40 * 16) @(posedge clk_dbf);
    measuring = 1;
    repeat (150 * 16) @(posedge clk_dbf);
    measuring = 0;
    chk(nout >= 149, $sformatf("beam output count %0d", nout));
    r30 = pw[0] / pw[3];
    r1 = pw[1] / pw[0];
    r2 = pw[2] / pw[0];
    amp0 = amp0_sum / nout;
    $display("array gain %.1f (ideal 256), off-beam %.4f, two-lobe %.3f, amplitude %.1f (ideal %.1f)",
             r30, r1, r2, amp0, 16.0 * 31.0 * AMP);
    chk(r30 > 180.0 && r30 < 330.0, "array gain of the steered beam");
    chk(r1 < 0.05, "rejection of the beam steered away");
    chk(r2 > 0.15 && r2 < 0.40, "two-main-lobe beam response");
    chk(amp0 > 0.85 * 16.0 * 31.0 * AMP && amp0 < 1.1 * 16.0 * 31.0 * AMP, "beam amplitude");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
