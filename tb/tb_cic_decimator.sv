// tb_cic_decimator: checks both decimator configurations (R = 16 with 13-bit data,
// R = 8 with 17-bit data) against a direct convolution with the third-order CIC
// impulse response. The test starts from reset and divides the result by R^3 with
// floor. It also checks that out_valid pulses exactly every R cycles, and that a
// full-scale DC input comes out at full scale without wrapping.
module tb_cic_decimator;
  logic clk = 0, rst_n = 0;
  logic signed [12:0] a_i = 0, a_q = 0;
  logic signed [16:0] b_i = 0, b_q = 0;
  logic signed [12:0] ao_i, ao_q;
  logic signed [16:0] bo_i, bo_q;
  logic av, bv;
  int checks = 0, failures = 0;

  cic_decimator #(.IW(13), .R(16), .ORDER(3), .OW(13)) dut_a (
    .clk, .rst_n, .in_i(a_i), .in_q(a_q), .out_i(ao_i), .out_q(ao_q), .out_valid(av));
  cic_decimator #(.IW(17), .R(8), .ORDER(3), .OW(17)) dut_b (
    .clk, .rst_n, .in_i(b_i), .in_q(b_q), .out_i(bo_i), .out_q(bo_q), .out_valid(bv));

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint ha [64], hb [32];     // CIC impulse responses
  longint xa_i [int], xa_q [int], xb_i [int], xb_q [int];
  int last_av = -1, last_bv = -1;

  // impulse response of ((1 - z^-R)/(1 - z^-1))^3
  task automatic build(int r, output longint h [64]);
    longint box [64], tmp [64];
    for (int j = 0; j < 64; j++) begin box[j] = (j < r) ? 1 : 0; h[j] = box[j]; end
    repeat (2) begin
      for (int j = 0; j < 64; j++) begin
        tmp[j] = 0;
        for (int m = 0; m <= j; m++) tmp[j] += h[m] * box[j - m];
      end
      h = tmp;
    end
  endtask

  function automatic longint conv(longint x [int], longint h [64], int t, int len);
    longint s = 0;
    for (int j = 0; j < len; j++)
      if (x.exists(t - j)) s += h[j] * x[t - j];
    return s;
  endfunction

  function automatic longint fdiv(longint v, longint d);
    longint q = v / d;
    if ((v % d != 0) && (v < 0)) q -= 1;
    return q;
  endfunction

  initial begin
    longint h16 [64], h8 [64];
    longint ei, eq;
    build(16, h16);
    build(8, h8);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      if (t < 3000) begin
        a_i = 13'(int'($urandom_range(8191)) - 4096);
        a_q = 13'(int'($urandom_range(8191)) - 4096);
        b_i = 17'(int'($urandom_range(131071)) - 65536);
        b_q = 17'(int'($urandom_range(131071)) - 65536);
      end else if (t < 4500) begin
        a_i = -13'sd4096; a_q = 13'sd4095; b_i = -17'sd65536; b_q = 17'sd65535;
      end else begin
        a_i = 13'(int'(1500.0 * $sin(t / 9.0))); a_q = 13'(int'(1500.0 * $cos(t / 9.0)));
        b_i = 17'(int'(30000.0 * $sin(t / 5.0))); b_q = 17'(int'(30000.0 * $cos(t / 5.0)));
      end
      xa_i[t] = a_i; xa_q[t] = a_q; xb_i[t] = b_i; xb_q[t] = b_q;
      @(posedge clk); #0.1;
      if (av) begin
        // the sample leaving at edge t covers inputs up to t-3
        ei = fdiv(conv(xa_i, h16, t - 3, 46), 4096);
        eq = fdiv(conv(xa_q, h16, t - 3, 46), 4096);
        checks++;
        if (longint'(ao_i) != ei || longint'(ao_q) != eq) begin
          failures++;
          if (failures < 6) $display("R16 t=%0d got %0d %0d exp %0d %0d", t, ao_i, ao_q, ei, eq);
        end
        if (last_av >= 0) begin
          checks++;
          if (t - last_av != 16) begin failures++; $display("R16 valid spacing %0d", t - last_av); end
        end
        last_av = t;
      end
      if (bv) begin
        ei = fdiv(conv(xb_i, h8, t - 3, 22), 512);
        eq = fdiv(conv(xb_q, h8, t - 3, 22), 512);
        checks++;
        if (longint'(bo_i) != ei || longint'(bo_q) != eq) begin
          failures++;
          if (failures < 6) $display("R8 t=%0d got %0d %0d exp %0d %0d", t, bo_i, bo_q, ei, eq);
        end
        if (last_bv >= 0) begin
          checks++;
          if (t - last_bv != 8) begin failures++; $display("R8 valid spacing %0d", t - last_bv); end
        end
        last_bv = t;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
