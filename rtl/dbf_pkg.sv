// dbf_pkg: types and constants shared by the interleaved bit-stream-processing
// (IL-BSP) digital beamformers.
//
// The band-pass delta-sigma ADCs deliver a 5-level bit stream (-2, -1, 0, 1, 2).
// It is carried as a 3-bit two's-complement value (bs_t). After interleaving, an
// element's stream becomes a quadrature pair of such values (iq_bs_t), one I and
// one Q sample per 2 GHz cycle. The array size (16 elements) and the beam count
// (4) are the values of both prototype receivers. The configuration address map
// (cfg_field_e) is this design's own choice. Weights, delays and ADC trims are
// written through it (see dbf_cfg_regs).
package dbf_pkg;

  localparam int unsigned N_ELEM = 16;  // antenna elements / ADCs per receiver
  localparam int unsigned N_BEAM = 4;   // simultaneous independent beams

  // ADC output scale used by the behavioural modulator model: one quantizer
  // step equals ADC_STEP input units.
  localparam int ADC_STEP = 8192;

  typedef logic signed [2:0] bs_t;      // 5-level bit-stream sample

  typedef struct packed {
    bs_t i;
    bs_t q;
  } iq_bs_t;

  // Field selector in the top two bits of a configuration address.
  typedef enum logic [1:0] {
    FLD_COS   = 2'd0,   // cos weight of (beam, element)
    FLD_SIN   = 2'd1,   // sin weight of (beam, element)
    FLD_DELAY = 2'd2,   // delay-line setting of (beam, element), timed array only
    FLD_TRIM  = 2'd3    // ADC trims of element: {q_delay[2:0], res_trim[2:0]}
  } cfg_field_e;

  localparam int unsigned CFG_DW = 10;  // configuration data width (widest weight)

  // A bit-stream sample is legal when it is one of the five levels.
  function automatic logic bs_legal(bs_t v);
    return (v >= -3'sd2) && (v <= 3'sd2);
  endfunction

  // Negation by the 2-level LO: a 2:1 choice between v and -v.
  function automatic bs_t bs_neg(bs_t v, logic neg);
    return neg ? bs_t'(-v) : v;
  endfunction

endpackage
