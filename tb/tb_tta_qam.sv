// tb_tta_qam: modulated-signal test of the true-time-delay receiver.
//
// Phase 1: a 5 MBd QAM-256 stream with rectangular symbols arrives from -30
// degrees. Its envelope and carrier are both truly delayed across the array. Beam 0
// is a true-time-delay beam steered to -30 degrees. Each symbol is taken as the
// mean of the middle 20 of its 50 output samples (250 MS/s). A least-squares
// complex gain is fitted, and the error-vector magnitude must be below -37 dB.
// Phase 2: a QAM-64 stream from -30 degrees plus a QAM-16 interferer 12 dB
// stronger from +20 degrees. Beam 1 is steered to -30 degrees with a null at +20
// degrees. Its EVM must be below -20 dB, and clearly better than the EVM of beam 0,
// which has no null.
module tb_tta_qam;
  import dbf_pkg::*;

  localparam real PI  = 3.14159265358979;
  localparam real FS  = 4.0e9;
  localparam real FC  = 1.0e9;
  localparam int  SPS = 800;            // 4 GS/s samples per 5 MBd symbol
  localparam int  OPS = 50;             // 250 MS/s outputs per symbol
  localparam int  NSYM1 = 60, NSYM2 = 60;

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
    #60000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(real v); return int'($floor(v + 0.5)); endfunction

  task automatic wr(int f, int b, int e, int d);
    @(negedge clk_dbf);
    cfg_we = 1; cfg_addr = 8'((f << 6) | (b << 4) | e); cfg_wdata = CFG_DW'(d);
    @(negedge clk_dbf);
    cfg_we = 0;
  endtask

  // symbols: desired (index by symbol number) and interferer
  real sd_r [NSYM1 + NSYM2 + 4], sd_i [NSYM1 + NSYM2 + 4];
  real si_r [NSYM1 + NSYM2 + 4], si_i [NSYM1 + NSYM2 + 4];
  real amp_d = 0.5, amp_i = 0.0;
  real deg_d = -30.0, deg_i = 20.0;

  function automatic real lvl(int m); // m-ary per axis, levels in [-1, 1]
    return (2.0 * $urandom_range(m - 1) - (m - 1)) / (m - 1);
  endfunction

  // passband sample of a truly delayed rectangular-symbol QAM stream
  function automatic real qam_rf(longint n, int k, real deg, const ref real sr [NSYM1 + NSYM2 + 4],
                                 const ref real si [NSYM1 + NSYM2 + 4]);
    real tau, t;
    int j;
    tau = $sin(deg * PI / 180.0) / (2.0 * FC);
    t = n / FS - k * tau;
    j = int'($floor(t * FS / SPS));
    if (j < 0) j = 0;
    return (sr[j] * $cos(2.0 * PI * FC * t) - si[j] * $sin(2.0 * PI * FC * t)) / $sqrt(2.0);
  endfunction

  longint n_s = 0;
  always @(negedge clk_adc) begin
    for (int k = 0; k < 16; k++)
      rf_in[k] <= 16'(rnd(ADC_STEP * (amp_d * qam_rf(n_s, k, deg_d, sd_r, sd_i)
                                    + amp_i * qam_rf(n_s, k, deg_i, si_r, si_i))));
    n_s <= n_s + 1;
  end

  // per-symbol averages of beams 0 and 1
  real acc_r [2], acc_i [2];
  real y_r [2][NSYM1 + NSYM2], y_i [2][NSYM1 + NSYM2];
  longint n_out = 0;
  always @(posedge clk_dbf) if (rst_n && beam_valid) begin
    int j, p;
    j = int'(n_out / OPS); p = int'(n_out % OPS);
    if (p >= 20 && p < 40)
      for (int b = 0; b < 2; b++) begin acc_r[b] += real'(beam_i[b]); acc_i[b] += real'(beam_q[b]); end
    if (p == 39 && j < NSYM1 + NSYM2)
      for (int b = 0; b < 2; b++) begin
        y_r[b][j] = acc_r[b] / 20.0; y_i[b][j] = acc_i[b] / 20.0; acc_r[b] = 0.0; acc_i[b] = 0.0;
      end
    n_out <= n_out + 1;
  end

  // EVM in dB of beam b over symbols [j0, j1), skipping nothing else
  function automatic real evm_db(int b, int j0, int j1);
    real nr, ni, d, gr, gi, er, ei, e2, s2;
    nr = 0.0; ni = 0.0; d = 0.0;
    for (int j = j0; j < j1; j++) begin           // g = sum(y s*) / sum |s|^2
      nr += y_r[b][j] * sd_r[j] + y_i[b][j] * sd_i[j];
      ni += y_i[b][j] * sd_r[j] - y_r[b][j] * sd_i[j];
      d  += sd_r[j] ** 2 + sd_i[j] ** 2;
    end
    gr = nr / d; gi = ni / d;
    e2 = 0.0; s2 = 0.0;
    for (int j = j0; j < j1; j++) begin
      er = y_r[b][j] - (gr * sd_r[j] - gi * sd_i[j]);
      ei = y_i[b][j] - (gr * sd_i[j] + gi * sd_r[j]);
      e2 += er * er + ei * ei;
      s2 += (gr * gr + gi * gi) * (sd_r[j] ** 2 + sd_i[j] ** 2);
    end
    return 10.0 * $log10(e2 / s2);
  endfunction

  initial begin
    real sg, sn, pr, pim, wr_, wi_, mx;
    real ar [16], ai [16];
    real e256, e64_null, e64_plain;
    foreach (acc_r[b]) begin acc_r[b] = 0.0; acc_i[b] = 0.0; end
    for (int j = 0; j < NSYM1 + NSYM2 + 4; j++) begin
      if (j < NSYM1) begin sd_r[j] = lvl(16); sd_i[j] = lvl(16); end
      else begin sd_r[j] = lvl(8); sd_i[j] = lvl(8); end
      si_r[j] = lvl(4); si_i[j] = lvl(4);
    end
    foreach (rf_in[k]) rf_in[k] = 0;
    repeat (4) @(negedge clk_dbf);
    rst_n = 1;
    sg = $sin(deg_d * PI / 180.0); sn = $sin(deg_i * PI / 180.0);
    // beam 0: true-time-delay beam at -30 deg
    for (int k = 0; k < 16; k++) begin
      wr(FLD_DELAY, 0, k, rnd(-k * sg));
      wr(FLD_COS, 0, k, rnd(511.0 * $cos(PI * k * sg)));
      wr(FLD_SIN, 0, k, rnd(-511.0 * $sin(PI * k * sg)));
    end
    // beam 1: same, with the +20 deg direction projected out
    pr = 0.0; pim = 0.0;
    for (int k = 0; k < 16; k++) begin
      pr += $cos(PI * k * (sg - sn)) / 16.0; pim += $sin(PI * k * (sg - sn)) / 16.0;
    end
    mx = 0.0;
    for (int k = 0; k < 16; k++) begin
      ar[k] = $cos(PI * k * sg) - (pr * $cos(PI * k * sn) - pim * $sin(PI * k * sn));
      ai[k] = $sin(PI * k * sg) - (pr * $sin(PI * k * sn) + pim * $cos(PI * k * sn));
      if ($sqrt(ar[k] ** 2 + ai[k] ** 2) > mx) mx = $sqrt(ar[k] ** 2 + ai[k] ** 2);
    end
    for (int k = 0; k < 16; k++) begin
      wr(FLD_DELAY, 1, k, rnd(-k * sg));
      wr(FLD_COS, 1, k, rnd(511.0 * ar[k] / mx));
      wr(FLD_SIN, 1, k, rnd(-511.0 * ai[k] / mx));
    end
    // phase 1: clean QAM-256; restart the symbol clock after configuration
    @(negedge clk_adc);
    n_s = 0;
    @(posedge clk_dbf);
    n_out = 0;
    wait (n_out == longint'(NSYM1) * OPS);
    // phase 2: QAM-64 plus a 12 dB stronger interferer at the null
    amp_d = 0.12; amp_i = 0.48;
    wait (n_out == longint'(NSYM1 + NSYM2) * OPS);
    e256      = evm_db(0, 2, NSYM1 - 1);
    e64_null  = evm_db(1, NSYM1 + 1, NSYM1 + NSYM2 - 1);
    e64_plain = evm_db(0, NSYM1 + 1, NSYM1 + NSYM2 - 1);
    $display("QAM-256 EVM %.1f dB; QAM-64 with interferer: nulled beam %.1f dB, plain beam %.1f dB",
             e256, e64_null, e64_plain);
    checks++; if (e256 > -37.0) failures++;
    checks++; if (e64_null > -20.0) failures++;
    checks++; if (e64_plain < e64_null + 6.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
