// tb_tta_dbf: end-to-end test of the true-time-delay receiver at its full size.
//
// A tone 50 MHz above the 1 GHz carrier arrives from 90 degrees. On a
// half-wavelength array that makes element k lag by k x 500 ps, one delay-line
// step per element. The four beams are programmed as follows. Beam 0 is the
// true-time-delay beam: delay 15-k, phase w_c*k*tau = pi*k. Beam 1 uses the same
// phases with all delays 0, which is a phased array and squints at this offset
// frequency. Beam 2 is a true-time-delay beam steered to -30 degrees. Beam 3 uses
// element 0 alone. The checks: beam 0's array gain over beam 3 (ideally 16^2), the
// squint loss of beam 1 (ideally 0.57 of beam 0's power), the rejection of beam 2,
// and the 8-cycle output spacing (250 MS/s).
module tb_tta_dbf;
  import dbf_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam real FS = 4.0e9;
  localparam real AMP = 0.5;

  logic clk_adc = 0, clk_dbf = 0, rst_n = 0;
  logic signed [15:0] rf_in [16];
  logic cfg_we = 0;
  logic [7:0] cfg_addr = 0;
  logic [CFG_DW-1:0] cfg_wdata = 0, cfg_rdata;
  logic signed [16:0] beam_i [4], beam_q [4];
  logic beam_valid;
  int checks = 0, failures = 0;

  tta_dbf dut (.clk_adc, .clk_dbf, .rst_n, .rf_in, .cfg_we, .cfg_addr, .cfg_wdata,
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
    cfg_we = 1; cfg_addr = 8'((f << 6) | (b << 4) | e); cfg_wdata = CFG_DW'(d);
    @(negedge clk_dbf);
    cfg_we = 0;
  endtask

  // true time delay of element k for a source at 90 deg: k x 500 ps = 2k samples at 4 GS/s
  real f_in = 1.05e9;
  longint n_s = 0;
  always @(negedge clk_adc) begin
    for (int k = 0; k < 16; k++)
      rf_in[k] <= 16'(int'($floor(AMP * ADC_STEP *
                   $cos(2.0 * PI * f_in * real'(n_s - 2 * k) / FS) + 0.5)));
    n_s <= n_s + 1;
  end

  real pw [4];
  int nout = 0, last_t = -1, t_dbf = 0;
  logic measuring = 0;

  always @(posedge clk_dbf) t_dbf <= t_dbf + 1;

  always @(posedge clk_dbf) if (rst_n && beam_valid) begin
    if (last_t >= 0 && t_dbf - last_t != 8) begin
      failures++; $display("FAIL: output spacing %0d cycles", t_dbf - last_t);
    end
    last_t = t_dbf;
    if (measuring) begin
      for (int b = 0; b < 4; b++) pw[b] += real'(beam_i[b]) ** 2 + real'(beam_q[b]) ** 2;
      nout++;
    end
  end

  // weights and delays of a true-time-delay beam steered to deg
  task automatic program_ttd(int b, real deg, logic use_delay);
    real sg, ph;
    int d;
    sg = $sin(deg * PI / 180.0);          // per-element delay in 500 ps steps
    for (int k = 0; k < 16; k++) begin
      d = (sg > 0.0) ? int'($floor((15 - k) * sg + 0.5)) : int'($floor(-k * sg + 0.5));
      ph = PI * k * sg;                   // w_c * k * tau
      wr(FLD_DELAY, b, k, use_delay ? d : 0);
      wr(FLD_COS, b, k, int'($floor(511.0 * $cos(ph) + 0.5)));
      wr(FLD_SIN, b, k, int'($floor(-511.0 * $sin(ph) + 0.5)));
    end
  endtask

  initial begin
    real g, sq, rj;
    foreach (rf_in[k]) rf_in[k] = 0;
    foreach (pw[b]) pw[b] = 0.0;
    repeat (4) @(negedge clk_dbf);
    rst_n = 1;
    program_ttd(0, 90.0, 1'b1);
    program_ttd(1, 90.0, 1'b0);
    program_ttd(2, -30.0, 1'b1);
    for (int k = 0; k < 16; k++) begin
      wr(FLD_COS, 3, k, (k == 0) ? 511 : 0);
      wr(FLD_SIN, 3, k, 0);
      wr(FLD_DELAY, 3, k, 0);
    end
    @(negedge clk_dbf);
    cfg_addr = 8'((FLD_DELAY << 6) | (0 << 4) | 3);
    #0.01;
    chk(cfg_rdata == CFG_DW'(12), "delay register read-back");
    repeat (40 * 8) @(posedge clk_dbf);
    measuring = 1;
    repeat (300 * 8) @(posedge clk_dbf);
    measuring = 0;
    chk(nout >= 299, $sformatf("beam output count %0d", nout));
    g = pw[0] / pw[3];
    sq = pw[1] / pw[0];
    rj = pw[2] / pw[0];
    $display("array gain %.1f (ideal 256), phase-only/true-time-delay %.3f (ideal 0.574), off-beam %.4f",
             g, sq, rj);
    chk(g > 180.0 && g < 330.0, "array gain of the true-time-delay beam");
    chk(sq > 0.45 && sq < 0.70, "squint loss of the phase-only beam");
    chk(rj < 0.05, "rejection of the beam steered away");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
