// dbf_cfg_regs: configuration registers of one beamformer chip.
//
// They hold, for every beam and element, the cos and sin weights of the complex
// weight multipliers (WW bits: 6 in the phased array, 10 in the timed array). With
// HAS_DELAY set they also hold the 4-bit delay-line setting of every beam and
// element; without it the delay outputs read 0 and no delay flops exist. With
// 6-bit weights only the low 6 bits of wdata are used. For every element they
// hold the ADC's 3-bit resonator trim and 3-bit quantizer sampling-delay trim. The document names these registers and their
// widths but not how they are loaded. The single-cycle write port, the address map
// and the combinational read-back are this design's choices. The address is
// {field (dbf_pkg::cfg_field_e), beam, element}. FLD_TRIM ignores the beam bits
// and takes wdata = {q_delay, res_trim}. A write lands on the rising clk edge
// where we is high and is visible on the outputs from the next cycle. Reset
// clears weights and delays and sets both trims to mid-code 4.
module dbf_cfg_regs
  import dbf_pkg::*;
#(
  parameter int unsigned NE        = N_ELEM,
  parameter int unsigned NB        = N_BEAM,
  parameter int unsigned WW        = 6,      // weight width
  parameter int unsigned DSW       = 4,      // delay setting width
  parameter bit          HAS_DELAY = 1'b0,
  localparam int unsigned EB = (NE > 1) ? $clog2(NE) : 1,
  localparam int unsigned BB = (NB > 1) ? $clog2(NB) : 1,
  localparam int unsigned AW = 2 + BB + EB
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic [AW-1:0]        addr,
  input  logic [CFG_DW-1:0]    wdata,
  output logic [CFG_DW-1:0]    rdata,
  output logic signed [WW-1:0] wc   [NB][NE],
  output logic signed [WW-1:0] ws   [NB][NE],
  output logic [DSW-1:0]       dly  [NB][NE],
  output logic [2:0]           res_trim [NE],
  output logic [2:0]           q_delay  [NE]
);

  cfg_field_e        fld;
  logic [BB-1:0]     b;
  logic [EB-1:0]     e;

  assign fld = cfg_field_e'(addr[AW-1 -: 2]);
  assign b   = addr[EB +: BB];
  assign e   = addr[EB-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NB; i++)
        for (int j = 0; j < NE; j++) begin
          wc[i][j] <= '0;
          ws[i][j] <= '0;
        end
      for (int j = 0; j < NE; j++) begin
        res_trim[j] <= 3'd4;
        q_delay[j]  <= 3'd4;
      end
    end else if (we) begin
      unique case (fld)
        FLD_COS:  if (int'(b) < NB && int'(e) < NE) wc[b][e] <= WW'(wdata);
        FLD_SIN:  if (int'(b) < NB && int'(e) < NE) ws[b][e] <= WW'(wdata);
        FLD_TRIM: if (int'(e) < NE) begin
                    res_trim[e] <= wdata[2:0];
                    q_delay[e]  <= wdata[5:3];
                  end
        default: ;
      endcase
    end
  end

  if (HAS_DELAY) begin : g_dly
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < NB; i++)
          for (int j = 0; j < NE; j++) dly[i][j] <= '0;
      end else if (we && fld == FLD_DELAY && int'(b) < NB && int'(e) < NE) begin
        dly[b][e] <= wdata[DSW-1:0];
      end
    end
  end else begin : g_no_dly
    always_comb
      for (int i = 0; i < NB; i++)
        for (int j = 0; j < NE; j++) dly[i][j] = '0;
  end

  always_comb begin
    rdata = '0;
    if (int'(b) < NB && int'(e) < NE) begin
      unique case (fld)
        FLD_COS:   rdata = CFG_DW'(unsigned'(wc[b][e]));
        FLD_SIN:   rdata = CFG_DW'(unsigned'(ws[b][e]));
        FLD_DELAY: rdata = CFG_DW'(dly[b][e]);
        FLD_TRIM:  rdata = CFG_DW'({q_delay[e], res_trim[e]});
      endcase
    end
  end

endmodule
