// tb_beam_patterns: measures beam patterns of both receivers by sweeping the
// source angle from -90 to +90 degrees in 10-degree steps. Each measured beam
// amplitude is compared with the array factor computed from the programmed
// (quantized) weights and delays, including the CIC droop at the tone's offset.
//
// Phased array, three weight sets:
//   A (tone at 994 MHz): four simultaneous beams at 0, 30, 60 and -45 degrees;
//   B (1.006 GHz): two main lobes at 10 and 50 degrees (averaged weights),
//     a Dolph-Chebyshev taper at 0 degrees, and uniform beams at 20 and 0 degrees;
//   C (955 MHz): beams at 30, -30, 60 and 0 degrees far off the carrier, where
//     phase steering squints.
// Timed array, one weight set, measured at -50, 0 and +50 MHz offsets:
//   true-time-delay beams at -60 and 90 degrees; a beam at -30 degrees with a
//   null steered to 20 degrees; and a Chebyshev-tapered beam at 0 degrees with
//   sidelobes below -25 dB.
// In the main lobe (ideal within 15 dB of the peak) the measured and ideal
// responses must agree within 1.5 dB. Elsewhere the measurement must stay
// below -12 dB. At the carrier the steered null must be at least 25 dB down (a
// phase-projected null is narrowband and is not checked off the carrier), and the
// tapered beams' sidelobes must be at least 20 dB down.
module tb_beam_patterns;
  import dbf_pkg::*;

  localparam real PI  = 3.14159265358979;
  localparam real FS  = 4.0e9;
  localparam real FC  = 1.0e9;
  localparam real AMP = 0.6;

  logic clk_adc = 0, clk_dbf = 0, rst_n = 0;
  logic signed [15:0] pa_rf [16], tta_rf [16];
  logic pa_we = 0, tta_we = 0;
  logic [7:0] pa_addr = 0, tta_addr = 0;
  logic [CFG_DW-1:0] pa_wd = 0, tta_wd = 0, pa_rd, tta_rd;
  logic signed [12:0] pa_i [4], pa_q [4];
  logic signed [16:0] tta_i [4], tta_q [4];
  logic pa_v, tta_v;
  int checks = 0, failures = 0;

  pa_dbf u_pa (.clk_adc, .clk_dbf, .rst_n, .rf_in(pa_rf), .cfg_we(pa_we), .cfg_addr(pa_addr),
               .cfg_wdata(pa_wd), .cfg_rdata(pa_rd), .beam_i(pa_i), .beam_q(pa_q), .beam_valid(pa_v));
  tta_dbf u_tta (.clk_adc, .clk_dbf, .rst_n, .rf_in(tta_rf), .cfg_we(tta_we), .cfg_addr(tta_addr),
                 .cfg_wdata(tta_wd), .cfg_rdata(tta_rd), .beam_i(tta_i), .beam_q(tta_q), .beam_valid(tta_v));

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

  function automatic real fabs(real v); return (v < 0.0) ? -v : v; endfunction
  function automatic int rnd(real v); return int'($floor(v + 0.5)); endfunction
  function automatic real db(real v); return 20.0 * $log10(v > 1e-12 ? v : 1e-12); endfunction

  // ---------------- stimulus: one tone from one direction per chip ----------------
  real pa_deg = 0.0, pa_f = FC, tta_deg = 0.0, tta_f = FC;
  longint n_s = 0;
  always @(negedge clk_adc) begin
    real tp, tt;
    tp = $sin(pa_deg * PI / 180.0) / (2.0 * FC);
    tt = $sin(tta_deg * PI / 180.0) / (2.0 * FC);
    for (int k = 0; k < 16; k++) begin
      pa_rf[k]  <= 16'(rnd(AMP * ADC_STEP * $cos(2.0 * PI * pa_f  * (n_s / FS - k * tp))));
      tta_rf[k] <= 16'(rnd(AMP * ADC_STEP * $cos(2.0 * PI * tta_f * (n_s / FS - k * tt))));
    end
    n_s <= n_s + 1;
  end

  // ---------------- programmed weights, kept for the ideal response ----------------
  int pc [4][16], ps [4][16], tc [4][16], ts [4][16], td [4][16];

  task automatic wr(bit tta, int f, int b, int e, int d);
    @(negedge clk_dbf);
    if (tta) begin tta_we = 1; tta_addr = 8'((f << 6) | (b << 4) | e); tta_wd = CFG_DW'(d); end
    else     begin pa_we = 1;  pa_addr  = 8'((f << 6) | (b << 4) | e); pa_wd  = CFG_DW'(d); end
    @(negedge clk_dbf);
    pa_we = 0; tta_we = 0;
  endtask

  // complex weight g = gr + j gi (|g| <= 1) applied to element k of a beam
  task automatic set_w(bit tta, int b, int k, real gr, real gi, int d);
    int c, s;
    real a;
    a = tta ? 511.0 : 31.0;
    c = rnd(a * gr); s = rnd(-a * gi);
    if (tta) begin tc[b][k] = c; ts[b][k] = s; td[b][k] = d; wr(1, FLD_DELAY, b, k, d); end
    else     begin pc[b][k] = c; ps[b][k] = s; end
    wr(tta, FLD_COS, b, k, c);
    wr(tta, FLD_SIN, b, k, s);
  endtask

  function automatic real sgn_sin(real deg); return $sin(deg * PI / 180.0); endfunction

  task automatic steer(bit tta, int b, real deg, logic ttd);
    real sg;
    sg = sgn_sin(deg);
    for (int k = 0; k < 16; k++)
      set_w(tta, b, k, $cos(PI * k * sg), $sin(PI * k * sg),
            !ttd ? 0 : (sg > 0.0) ? rnd((15 - k) * sg) : rnd(-k * sg));
  endtask

  task automatic two_lobe(int b, real d1, real d2);
    real p1, p2;
    for (int k = 0; k < 16; k++) begin
      p1 = PI * k * sgn_sin(d1); p2 = PI * k * sgn_sin(d2);
      set_w(0, b, k, ($cos(p1) + $cos(p2)) / 2.0, ($sin(p1) + $sin(p2)) / 2.0, 0);
    end
  endtask

  // Dolph-Chebyshev weights for 16 elements, sidelobes at -sll dB
  function automatic real cheb_T(int n, real x);
    if (x > 1.0)  return $cosh(n * $acosh(x));
    if (x < -1.0) return ((n % 2) ? -1.0 : 1.0) * $cosh(n * $acosh(-x));
    return $cos(n * $acos(x));
  endfunction

  real cheb_w [16];
  task automatic make_cheb(real sll);
    real x0, mx, u;
    x0 = $cosh($acosh(10.0 ** (sll / 20.0)) / 15.0);
    mx = 0.0;
    for (int n = 0; n < 16; n++) begin
      cheb_w[n] = 0.0;
      for (int m = 0; m < 16; m++) begin
        u = 2.0 * PI * m / 16.0;
        cheb_w[n] += cheb_T(15, x0 * $cos(u / 2.0)) * $cos((n - 7.5) * u) / 16.0;
      end
      if (fabs(cheb_w[n]) > mx) mx = fabs(cheb_w[n]);
    end
    for (int n = 0; n < 16; n++) cheb_w[n] /= mx;
  endtask

  task automatic taper(bit tta, int b);
    for (int k = 0; k < 16; k++) set_w(tta, b, k, cheb_w[k], 0.0, 0);
  endtask

  // beam b steered to deg with a null forced at null_deg (projection of the
  // steering vector off the null direction)
  task automatic null_beam(int b, real deg, real null_deg);
    real sg, sn, pr, pi_, gr, gi, mx;
    real wr_ [16], wi_ [16];
    int d;
    sg = sgn_sin(deg); sn = sgn_sin(null_deg);
    pr = 0.0; pi_ = 0.0;           // <a_null, a_main> / 16
    for (int k = 0; k < 16; k++) begin
      pr += $cos(PI * k * (sg - sn)) / 16.0;
      pi_ += $sin(PI * k * (sg - sn)) / 16.0;
    end
    mx = 0.0;
    for (int k = 0; k < 16; k++) begin
      wr_[k] = $cos(PI * k * sg) - (pr * $cos(PI * k * sn) - pi_ * $sin(PI * k * sn));
      wi_[k] = $sin(PI * k * sg) - (pr * $sin(PI * k * sn) + pi_ * $cos(PI * k * sn));
      if ($sqrt(wr_[k] ** 2 + wi_[k] ** 2) > mx) mx = $sqrt(wr_[k] ** 2 + wi_[k] ** 2);
    end
    for (int k = 0; k < 16; k++) begin
      d = (sg > 0.0) ? rnd((15 - k) * sg) : rnd(-k * sg);
      set_w(1, b, k, wr_[k] / mx, wi_[k] / mx, d);
    end
  endtask

  // ideal output amplitude of a beam for a tone at frequency f from deg
  function automatic real ideal(bit tta, int b, real deg, real f);
    real tau, ph, re, im, df, r, x, droop, cr, ci;
    tau = sgn_sin(deg) / (2.0 * FC);
    df = f - FC;
    re = 0.0; im = 0.0;
    for (int k = 0; k < 16; k++) begin
      cr = tta ? tc[b][k] : pc[b][k];
      ci = tta ? -ts[b][k] : -ps[b][k];
      ph = -2.0 * PI * f * k * tau - (tta ? 2.0 * PI * df * td[b][k] * 0.5e-9 : 0.0);
      re += cr * $cos(ph) - ci * $sin(ph);
      im += cr * $sin(ph) + ci * $cos(ph);
    end
    r = tta ? 8.0 : 16.0;
    x = PI * df / 2.0e9;
    droop = (fabs(df) < 1.0) ? 1.0 : ($sin(r * x) / (r * $sin(x))) ** 3;
    return AMP * $sqrt(re * re + im * im) * fabs(droop);
  endfunction

  // ---------------- measurement ----------------
  real pa_pw [4], tta_pw [4];
  int pa_n = 0, tta_n = 0;
  logic meas = 0;
  always @(posedge clk_dbf) if (rst_n && meas) begin
    if (pa_v) begin
      foreach (pa_pw[b]) pa_pw[b] += real'(pa_i[b]) ** 2 + real'(pa_q[b]) ** 2;
      pa_n++;
    end
    if (tta_v) begin
      foreach (tta_pw[b]) tta_pw[b] += real'(tta_i[b]) ** 2 + real'(tta_q[b]) ** 2;
      tta_n++;
    end
  end

  real pa_peak [4], tta_peak [4];
  real pa_pk_deg [4], tta_pk_deg [4];
  logic pa_taper [4], tta_taper [4];
  real tta_null_deg [4];
  int n_main = 0, n_side = 0;

  task automatic judge(string tag, int b, real deg, real meas_amp, real id, real peak, logic tapered,
                       real pk_deg, real null_deg);
    real rm, ri;
    rm = db(meas_amp / peak);
    ri = db(id / peak);
    checks++;
    if (ri > -15.0) begin
      n_main++;
      if (fabs(rm - ri) > 1.5) begin
        failures++; $display("FAIL %s beam %0d at %0.1f deg: %0.2f dB, ideal %0.2f dB", tag, b, deg, rm, ri);
      end
    end else begin
      n_side++;
      if (rm > -12.0) begin
        failures++; $display("FAIL %s beam %0d at %0.1f deg: %0.2f dB, ideal %0.2f dB", tag, b, deg, rm, ri);
      end
    end
    if (tapered && fabs(deg - pk_deg) >= 20.0) begin
      checks++;
      if (rm > -20.0) begin failures++; $display("FAIL %s tapered beam %0d sidelobe %0.2f dB at %0.1f", tag, b, rm, deg); end
    end
    if (fabs(deg - null_deg) < 0.01) begin
      checks++;
      $display("%s beam %0d null at %0.1f deg: %0.2f dB", tag, b, deg, rm);
      if (rm > -25.0) begin failures++; $display("FAIL %s null only %0.2f dB", tag, rm); end
    end
  endtask

  task automatic sweep(string tag, real pa_fin, real tta_fin);
    pa_f = pa_fin; tta_f = tta_fin;
    for (int b = 0; b < 4; b++) begin
      pa_peak[b]  = ideal(0, b, pa_pk_deg[b], pa_fin);
      tta_peak[b] = ideal(1, b, tta_pk_deg[b], tta_fin);
    end
    for (int a = -90; a <= 90; a += 10) begin
      pa_deg = a; tta_deg = a;
      repeat (12 * 16) @(posedge clk_dbf);
      foreach (pa_pw[b]) begin pa_pw[b] = 0.0; tta_pw[b] = 0.0; end
      pa_n = 0; tta_n = 0;
      meas = 1;
      repeat (32 * 16) @(posedge clk_dbf);
      meas = 0;
      for (int b = 0; b < 4; b++) begin
        judge({tag, " PA"}, b, a, $sqrt(pa_pw[b] / pa_n), ideal(0, b, a, pa_fin), pa_peak[b],
              pa_taper[b], pa_pk_deg[b], 999.0);
        judge({tag, " TTA"}, b, a, $sqrt(tta_pw[b] / tta_n), ideal(1, b, a, tta_fin), tta_peak[b],
              tta_taper[b], tta_pk_deg[b], (tta_fin == FC) ? tta_null_deg[b] : 999.0);
      end
    end
  endtask

  initial begin
    foreach (pa_rf[k]) begin pa_rf[k] = 0; tta_rf[k] = 0; end
    foreach (pa_taper[b]) begin pa_taper[b] = 0; tta_taper[b] = 0; tta_null_deg[b] = 999.0; end
    make_cheb(25.0);
    repeat (4) @(negedge clk_dbf);
    rst_n = 1;
    // timed array: Fig.-42-style beam set
    steer(1, 0, -60.0, 1'b1);  tta_pk_deg[0] = -60.0;
    steer(1, 1, 90.0, 1'b1);   tta_pk_deg[1] = 90.0;
    null_beam(2, -30.0, 20.0); tta_pk_deg[2] = -30.0; tta_null_deg[2] = 20.0;
    taper(1, 3);               tta_pk_deg[3] = 0.0; tta_taper[3] = 1;
    // phased array set A
    steer(0, 0, 0.0, 0);  steer(0, 1, 30.0, 0);  steer(0, 2, 60.0, 0);  steer(0, 3, -45.0, 0);
    pa_pk_deg[0] = 0.0; pa_pk_deg[1] = 30.0; pa_pk_deg[2] = 60.0; pa_pk_deg[3] = -45.0;
    sweep("A/-50MHz", 0.994e9, FC - 50.0e6);
    // phased array set B
    two_lobe(0, 10.0, 50.0);  taper(0, 1);  steer(0, 2, 20.0, 0);  steer(0, 3, 0.0, 0);
    pa_pk_deg[0] = 10.0; pa_pk_deg[1] = 0.0; pa_pk_deg[2] = 20.0; pa_pk_deg[3] = 0.0;
    pa_taper[1] = 1;
    sweep("B/0MHz", 1.006e9, FC);
    // phased array set C: far off the carrier
    pa_taper[1] = 0;
    steer(0, 0, 30.0, 0);  steer(0, 1, -30.0, 0);  steer(0, 2, 60.0, 0);  steer(0, 3, 0.0, 0);
    pa_pk_deg[0] = 30.0; pa_pk_deg[1] = -30.0; pa_pk_deg[2] = 60.0; pa_pk_deg[3] = 0.0;
    sweep("C/+50MHz", 0.955e9, FC + 50.0e6);
    $display("pattern points: %0d in main lobes, %0d outside", n_main, n_side);
    checks++;
    if (n_main < 20 || n_side < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
