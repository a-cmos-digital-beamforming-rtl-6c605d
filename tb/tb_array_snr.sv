// tb_array_snr: array gain of both receivers.
//
// A 1.013 GHz tone arrives at the 16 elements from +20 degrees, with independent
// white noise added to each element's input, as thermal noise would be. Both
// receivers see the same inputs. Beam 0 of pa_dbf is steered to +20 degrees with
// 6-bit weights. Beam 0 of tta_dbf is a true-time-delay beam to +20 degrees with
// 10-bit weights. Next to them, a lone channel (ctbpdsm, interleaver, ddc and a
// full-precision 3rd-order CIC decimating by 16) digitizes element 0 alone. It is
// the single-element reference.
// For each output, 1024 complex samples are taken (125 MS/s, or 250 MS/s for the
// timed array). The tone lands on an exact output bin. A full DFT gives the tone
// power and the power of all other bins within +-50 MHz, the 100 MHz signal band,
// DC left out. Those other bins count as noise.
// The tone sits 12.9 MHz above the carrier. Because the interleaver takes each Q
// sample 250 ps after its I sample, the two rails of one element are skewed by
// delta = 2 pi (FIN - FC) / FS. That leaves a mirror image of relative amplitude
// tan(delta / 2) at -12.9 MHz. The image is reported on its own and kept out of
// the noise. In a beam, the images of the 16 elements add up steered toward a
// different direction, so the array suppresses them.
// Checks: the input noise sets the single channel's SNR near 48 dB. 16 elements
// can add 12 dB at most. The phased-array beam must gain 8 to 12.5 dB, since its
// 13-bit output costs a little. The timed-array beam, with 17 bits, must gain 10
// to 12.8 dB. Each beam's tone amplitude must match 16 coherent copies of the
// single channel times the weight magnitude (31 or 511), corrected for the
// different CIC droop. The single channel's image must match tan(delta / 2) within
// 1 dB. Each beam's image must lie at least 10 dB below that.
module tb_array_snr;
  import dbf_pkg::*;

  localparam real PI  = 3.14159265358979;
  localparam real FS  = 4.0e9;
  localparam real FC  = 1.0e9;
  localparam int  NOUT = 1024;
  localparam int  KBIN = 106;                       // tone bin: 106 * 125 MHz / 1024
  localparam real FIN  = FC + KBIN * 125.0e6 / NOUT;
  localparam real AMP  = 0.95;                      // tone amplitude, quantizer steps
  localparam real SIGMA = 0.0130;                   // input noise rms, quantizer steps
  localparam real DEG  = 20.0;
  localparam int  SKIP = 16;                        // outputs discarded while filters settle

  logic clk_adc = 0, clk_dbf = 0, rst_n = 0;
  logic signed [15:0] rf_in [16];
  logic pa_we = 0, tta_we = 0;
  logic [7:0] cfg_addr = 0;
  logic [CFG_DW-1:0] cfg_wdata = 0, pa_rd, tta_rd;
  logic signed [12:0] beam_i [4], beam_q [4];
  logic signed [16:0] tta_i [4], tta_q [4];
  logic beam_valid, tta_valid;
  int checks = 0, failures = 0;

  pa_dbf dut (.clk_adc, .clk_dbf, .rst_n, .rf_in, .cfg_we(pa_we), .cfg_addr, .cfg_wdata,
              .cfg_rdata(pa_rd), .beam_i, .beam_q, .beam_valid);
  tta_dbf u_tta (.clk_adc, .clk_dbf, .rst_n, .rf_in, .cfg_we(tta_we), .cfg_addr, .cfg_wdata,
                 .cfg_rdata(tta_rd), .beam_i(tta_i), .beam_q(tta_q), .beam_valid(tta_valid));

  // single-element reference channel on element 0
  bs_t    s_adc;
  iq_bs_t s_il, s_bb;
  logic   s_lo;
  logic signed [14:0] s_i, s_q;
  logic   s_valid;
  ctbpdsm u_adc (.clk(clk_adc), .rst_n, .vin(rf_in[0]), .res_trim(3'd4), .q_delay(3'd4),
                 .dout(s_adc));
  interleaver u_il (.clk_adc, .clk_dbf, .rst_n, .din(s_adc), .dout(s_il));
  ddc u_ddc (.clk(clk_dbf), .rst_n, .lo(s_lo), .din(s_il), .dout(s_bb));
  cic_decimator #(.IW(3), .R(16), .ORDER(3), .OW(15)) u_cic (
    .clk(clk_dbf), .rst_n, .in_i(s_bb.i), .in_q(s_bb.q), .out_i(s_i), .out_q(s_q),
    .out_valid(s_valid));

  always_ff @(posedge clk_dbf or negedge rst_n)
    if (!rst_n) s_lo <= 1'b0;
    else        s_lo <= ~s_lo;

  initial forever begin
    #0.125 clk_adc = 1; clk_dbf = ~clk_dbf;
    #0.125 clk_adc = 0;
  end

  initial begin : watchdog
    #40000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(real v); return int'($floor(v + 0.5)); endfunction

  // approximately Gaussian, unit variance: sum of 12 uniforms minus 6
  function automatic real gauss();
    real s = 0.0;
    for (int j = 0; j < 12; j++) s += real'($urandom) / 4294967296.0;
    return s - 6.0;
  endfunction

  task automatic wr(bit tta, int f, int b, int e, int d);
    @(negedge clk_dbf);
    pa_we = !tta; tta_we = tta;
    cfg_addr = 8'((f << 6) | (b << 4) | e); cfg_wdata = CFG_DW'(d);
    @(negedge clk_dbf);
    pa_we = 0; tta_we = 0;
  endtask

  // passband gain of the gain-normalized 3rd-order CIC decimating 2 GS/s by r
  function automatic real cic_gain(int r, real f);
    real x;
    x = PI * f / 2.0e9;
    return ($sin(r * x) / (r * $sin(x))) ** 3;
  endfunction

  // element k sees the tone delayed by k * sin(DEG) / (2 FC)
  longint n_s = 0;
  always @(negedge clk_adc) begin
    real tau, t;
    tau = $sin(DEG * PI / 180.0) / (2.0 * FC);
    for (int k = 0; k < 16; k++) begin
      t = n_s / FS - k * tau;
      rf_in[k] <= 16'(rnd(ADC_STEP * (AMP * $cos(2.0 * PI * FIN * t) + SIGMA * gauss())));
    end
    n_s <= n_s + 1;
  end

  // records: [0] phased-array beam 0, [1] single channel, [2] timed-array beam 0
  real yr [3][NOUT], yi [3][NOUT];
  int  na = 0, ns = 0, nt = 0;
  logic run = 0;
  always @(posedge clk_dbf) if (run) begin
    if (beam_valid && na < SKIP + NOUT) begin
      if (na >= SKIP) begin yr[0][na-SKIP] = real'(beam_i[0]); yi[0][na-SKIP] = real'(beam_q[0]); end
      na++;
    end
    if (s_valid && ns < SKIP + NOUT) begin
      if (ns >= SKIP) begin yr[1][ns-SKIP] = real'(s_i); yi[1][ns-SKIP] = real'(s_q); end
      ns++;
    end
    if (tta_valid && nt < SKIP + NOUT) begin
      if (nt >= SKIP) begin yr[2][nt-SKIP] = real'(tta_i[0]); yi[2][nt-SKIP] = real'(tta_q[0]); end
      nt++;
    end
  end

  // SNR of record r over the 100 MHz band from a full DFT. At 125 MS/s that is bins
  // |m| <= 409 and the tone is on bin KBIN; at 250 MS/s (r = 2) the bins are twice as
  // wide. The tone is on the + or - tone bin, whichever is stronger. Its mirror bin
  // holds the I/Q-skew image and is reported apart, as img (power relative to the
  // tone). DC is left out. amp returns the tone amplitude.
  function automatic real snr_db(int r, output real amp, output real img);
    real sig, nse, pp, pm;
    int band, kb;
    band = (r == 2) ? 204 : 409;
    kb   = (r == 2) ? KBIN / 2 : KBIN;
    sig = 0.0; nse = 0.0; pp = 0.0; pm = 0.0;
    for (int m = -band; m <= band; m++) begin
      real ar, ai, w, pw;
      ar = 0.0; ai = 0.0;
      for (int n = 0; n < NOUT; n++) begin
        w = 2.0 * PI * m * n / NOUT;
        ar += yr[r][n] * $cos(w) + yi[r][n] * $sin(w);
        ai += yi[r][n] * $cos(w) - yr[r][n] * $sin(w);
      end
      pw = (ar * ar + ai * ai) / (real'(NOUT) * NOUT);
      if (m == kb) pp = pw;
      else if (m == -kb) pm = pw;
      else if (m != 0) nse += pw;
    end
    sig = (pp > pm) ? pp : pm;
    img = 10.0 * $log10(((pp > pm) ? pm : pp) / sig);
    amp = $sqrt(sig);
    return 10.0 * $log10(sig / nse);
  endfunction

  initial begin
    real sg, s_arr, s_one, s_tta, a_arr, a_one, a_tta, i_arr, i_one, i_tta, i_exp, ratio, r_tta;
    foreach (rf_in[k]) rf_in[k] = 0;
    repeat (4) @(negedge clk_dbf);
    rst_n = 1;
    sg = $sin(DEG * PI / 180.0);
    for (int k = 0; k < 16; k++) begin
      wr(0, FLD_COS, 0, k, rnd(31.0 * $cos(PI * k * sg)));
      wr(0, FLD_SIN, 0, k, rnd(-31.0 * $sin(PI * k * sg)));
      wr(1, FLD_COS, 0, k, rnd(511.0 * $cos(PI * k * sg)));
      wr(1, FLD_SIN, 0, k, rnd(-511.0 * $sin(PI * k * sg)));
      wr(1, FLD_DELAY, 0, k, rnd((15 - k) * sg));
    end
    run = 1;
    wait (na == SKIP + NOUT && ns == SKIP + NOUT && nt == SKIP + NOUT);
    s_arr = snr_db(0, a_arr, i_arr);
    s_one = snr_db(1, a_one, i_one);
    s_tta = snr_db(2, a_tta, i_tta);
    ratio = a_arr / (16.0 * 31.0 * a_one / 4096.0);
    // the timed array decimates by 8, so its CIC droops less at the tone
    r_tta = a_tta / (16.0 * 511.0 * a_one / 4096.0) * cic_gain(16, FIN - FC) / cic_gain(8, FIN - FC);
    // the Q sample trails the I sample by 1/FS: the rails are skewed by delta,
    // which leaves an image of relative amplitude tan(delta / 2)
    i_exp = 20.0 * $log10($tan(PI * (FIN - FC) / FS));
    $display("single element: SNR %.1f dB, image %.1f dBc (skew predicts %.1f dBc)", s_one, i_one, i_exp);
    $display("16-element beam: SNR %.1f dB, image %.1f dBc; array gain %.1f dB, coherent gain ratio %.3f",
             s_arr, i_arr, s_arr - s_one, ratio);
    $display("timed-array beam: SNR %.1f dB, image %.1f dBc; array gain %.1f dB, coherent gain ratio %.3f",
             s_tta, i_tta, s_tta - s_one, r_tta);
    checks++; if (s_one < 45.0 || s_one > 51.0) failures++;
    checks++; if (s_arr - s_one < 8.0 || s_arr - s_one > 12.5) failures++;
    checks++; if (ratio < 0.95 || ratio > 1.03) failures++;
    checks++; if (i_one < i_exp - 1.0 || i_one > i_exp + 1.0) failures++;
    checks++; if (i_arr > i_exp - 10.0) failures++;
    checks++; if (s_tta - s_one < 10.0 || s_tta - s_one > 12.8) failures++;
    checks++; if (r_tta < 0.97 || r_tta > 1.03) failures++;
    checks++; if (i_tta > i_exp - 10.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
