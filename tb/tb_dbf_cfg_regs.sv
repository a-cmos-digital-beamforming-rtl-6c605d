// tb_dbf_cfg_regs: writes random values to every weight, delay and trim register
// of a timed-array register file (10-bit weights, delays on) and a phased-array
// one (6-bit weights, no delays). It then checks the outputs and the read-back
// against a scoreboard, including the reset values.
module tb_dbf_cfg_regs;
  import dbf_pkg::*;

  logic clk = 0, rst_n = 0, we = 0;
  logic [7:0] addr = 0;
  logic [CFG_DW-1:0] wdata = 0, rd_t, rd_p;
  logic signed [9:0] wc_t [4][16], ws_t [4][16];
  logic signed [5:0] wc_p [4][16], ws_p [4][16];
  logic [3:0] dly_t [4][16], dly_p [4][16];
  logic [2:0] rt_t [16], qd_t [16], rt_p [16], qd_p [16];
  int checks = 0, failures = 0;

  dbf_cfg_regs #(.WW(10), .HAS_DELAY(1'b1)) dut_t (
    .clk, .rst_n, .we, .addr, .wdata, .rdata(rd_t), .wc(wc_t), .ws(ws_t), .dly(dly_t),
    .res_trim(rt_t), .q_delay(qd_t));
  dbf_cfg_regs #(.WW(6), .HAS_DELAY(1'b0)) dut_p (
    .clk, .rst_n, .we, .addr, .wdata, .rdata(rd_p), .wc(wc_p), .ws(ws_p), .dly(dly_p),
    .res_trim(rt_p), .q_delay(qd_p));

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sc [4][4][16];   // [field][beam][element] scoreboard of written data

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 8) $display("mismatch: %s", what); end
  endtask

  task automatic wr(int f, int b, int e, int d);
    @(negedge clk);
    we = 1; addr = 8'((f << 6) | (b << 4) | e); wdata = 10'(d);
    @(negedge clk);
    we = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(wc_t[2][5] == 0 && dly_t[3][15] == 0 && rt_t[7] == 4 && qd_p[0] == 4, "reset values");
    for (int f = 0; f < 4; f++) for (int b = 0; b < 4; b++) for (int e = 0; e < 16; e++)
      sc[f][b][e] = (f == 3) ? 36 : 0;
    for (int n = 0; n < 600; n++) begin
      int f, b, e, d;
      f = int'($urandom_range(3)); b = int'($urandom_range(3)); e = int'($urandom_range(15));
      d = int'($urandom_range(1023));
      wr(f, b, e, d);
      if (f == 3) for (int bb = 0; bb < 4; bb++) sc[3][bb][e] = d & 63;
      else sc[f][b][e] = d;
    end
    for (int b = 0; b < 4; b++) for (int e = 0; e < 16; e++) begin
      chk(int'(unsigned'(wc_t[b][e])) == sc[0][b][e], $sformatf("wc_t %0d %0d", b, e));
      chk(int'(unsigned'(ws_t[b][e])) == sc[1][b][e], "ws_t");
      chk(int'(dly_t[b][e]) == (sc[2][b][e] & 15), "dly_t");
      chk(int'(unsigned'(wc_p[b][e])) == (sc[0][b][e] & 63), "wc_p");
      chk(int'(unsigned'(ws_p[b][e])) == (sc[1][b][e] & 63), "ws_p");
      chk(dly_p[b][e] == 0, "dly_p");
      for (int f = 0; f < 4; f++) begin
        @(negedge clk);
        addr = 8'((f << 6) | (b << 4) | e);
        #0.1;
        case (f)
          0: chk(int'(rd_t) == sc[0][b][e], "rd cos");
          1: chk(int'(rd_t) == sc[1][b][e], "rd sin");
          2: chk(int'(rd_t) == (sc[2][b][e] & 15), "rd dly");
          default: chk(int'(rd_t) == sc[3][b][e], "rd trim");
        endcase
      end
    end
    for (int e = 0; e < 16; e++) begin
      chk(int'({qd_t[e], rt_t[e]}) == sc[3][0][e], "trim t");
      chk(int'({qd_p[e], rt_p[e]}) == sc[3][0][e], "trim p");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
