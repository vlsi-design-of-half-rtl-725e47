// hbiir_pkg: types and constants shared by the half-band IIR filter blocks.
//
// The half-band filters work on 16-bit two's complement samples and 16-bit
// all-pass coefficients, and their multipliers form 32-bit products. These
// widths are the ones the design's simulations use (16-bit input and
// coefficient buses, 32-bit product buses). The coefficient format, Q1.15
// (value = integer / 2^15, range [-1, 1)), is this design's own choice.
//
// mult_kind_e selects the multiplier structure used inside every all-pass
// cell: the Wallace tree multiplier (the faster and smaller one, the default)
// or the carry-save array multiplier.
package hbiir_pkg;

  localparam int unsigned DATA_W = 16;   // sample width
  localparam int unsigned COEF_W = 16;   // all-pass coefficient width
  localparam int unsigned COEF_FRAC = 15; // fractional bits of a coefficient (Q1.15)

  typedef enum logic [0:0] {
    MULT_WALLACE = 1'b0,
    MULT_ARRAY   = 1'b1
  } mult_kind_e;

  // The two all-pass coefficients of a half-band filter, a0 for branch 0
  // and a1 for branch 1, both Q1.15.
  typedef struct packed {
    logic signed [COEF_W-1:0] a0;
    logic signed [COEF_W-1:0] a1;
  } hb_coef_t;

  // Largest and smallest sample values.
  localparam logic signed [DATA_W-1:0] DATA_MAX = {1'b0, {(DATA_W-1){1'b1}}};
  localparam logic signed [DATA_W-1:0] DATA_MIN = {1'b1, {(DATA_W-1){1'b0}}};

  // Clamp a value carrying two guard bits into the sample range (two's
  // complement saturation). Used where an all-pass cell's adders could leave
  // the sample range.
  function automatic logic signed [DATA_W-1:0] sat_data(input logic signed [DATA_W+1:0] v);
    if (v > (DATA_W+2)'(DATA_MAX))      return DATA_MAX;
    else if (v < (DATA_W+2)'(DATA_MIN)) return DATA_MIN;
    else                            return v[DATA_W-1:0];
  endfunction

endpackage
