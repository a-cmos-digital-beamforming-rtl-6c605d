// dbf_beam: the processing of one beam, shared by all elements' baseband streams.
//
// For every element an optional delay line (HAS_DDL, timed array only) delays the
// down-converted stream by that element's setting. A complex weight multiplier
// then rotates it by the element's weight. The beam adder sums the NE rotated
// streams into a 2 GS/s quadrature beam, and a CIC decimator reduces it by R to
// the output rate. Weights and delays are static configuration inputs. Latency from
// bb to the decimator input: 1 (CWM) + 1 (adder) cycles, plus 1 + dly cycles with
// the delay line. out_valid pulses once every R cycles.
module dbf_beam
  import dbf_pkg::*;
#(
  parameter int unsigned NE      = N_ELEM,
  parameter int unsigned WW      = 6,
  parameter bit          HAS_DDL = 1'b0,
  parameter int unsigned DEPTH   = 16,
  parameter int unsigned R       = 16,
  parameter int unsigned ORDER   = 3,
  parameter int unsigned OW      = WW + 3 + $clog2(NE),
  localparam int unsigned DSW    = $clog2(DEPTH),
  localparam int unsigned SW     = WW + 3 + $clog2(NE)   // beam-sum width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  iq_bs_t               bb   [NE],   // down-converted element streams
  input  logic signed [WW-1:0] wc   [NE],
  input  logic signed [WW-1:0] ws   [NE],
  input  logic [DSW-1:0]       dly  [NE],   // used only with HAS_DDL
  output logic signed [OW-1:0] out_i,
  output logic signed [OW-1:0] out_q,
  output logic                 out_valid
);

  iq_bs_t               dl  [NE];
  logic signed [WW+2:0] pi  [NE];
  logic signed [WW+2:0] pq  [NE];
  logic signed [SW-1:0] sum_i, sum_q;

  for (genvar k = 0; k < NE; k++) begin : g_el
    if (HAS_DDL) begin : g_ddl
      ddl #(.DEPTH(DEPTH)) u_ddl (
        .clk, .rst_n, .din(bb[k]), .sel(dly[k]), .dout(dl[k]));
    end else begin : g_direct
      assign dl[k] = bb[k];
      wire unused_dly = ^dly[k];
    end
    cwm #(.W(WW)) u_cwm (
      .clk, .rst_n, .din(dl[k]), .wc(wc[k]), .ws(ws[k]),
      .dout_i(pi[k]), .dout_q(pq[k]));
  end

  beam_adder #(.N(NE), .IW(WW + 3)) u_add (
    .clk, .rst_n, .in_i(pi), .in_q(pq), .sum_i, .sum_q);

  cic_decimator #(.IW(SW), .R(R), .ORDER(ORDER), .OW(OW)) u_dec (
    .clk, .rst_n, .in_i(sum_i), .in_q(sum_q), .out_i, .out_q, .out_valid);

endmodule
