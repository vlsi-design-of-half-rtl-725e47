// hbiir_top: half-band IIR interpolation chain, with a single-rate half-band
// filter and a half-band decimator beside it.
//
// Chain (the interpolator of a delta-sigma DAC, fs to 64 fs):
//     x (fs) -> half-band IIR x2 -> half-band IIR x2 -> sinc^3 x2 -> sinc^2 x8 -> y (64 fs)
// The two half-band stages (hb_interp) are polyphase all-pass interpolators
// whose branches run at their input rate; the sinc stages (sinc_interp) are
// multiplier-free integrator-comb interpolators. The whole chain runs from one
// clock at the output rate, 64 fs. A counter divides it into the clock enables
// of each stage's output rate (fs*2, fs*4, fs*8, fs*64); stages hand samples
// on through their registered outputs, each stage taking its input on its own
// x_take cycles. That a single clock with enables drives the chain, and the
// widths of the sinc outputs, are this design's choices.
//
// Beside the chain, with ports of their own, stand the single-rate half-band
// filter (hb_iir_filter, two all-pass branches at the high rate) and the
// polyphase half-band decimator (hb_decim). Every all-pass cell uses the
// multiplier chosen by MULT (Wallace tree by default, or the array
// multiplier); the coefficients of each half-band filter are inputs.
//
// Chain timing: x must hold its sample while x_take is high; x_take is high
// one cycle in 64, the first right after reset. y carries one output sample per
// clock (y_valid high every cycle once running). The chain output has a DC
// gain of SINC3_RATIO^(SINC3_ORDER-1) * SINC2_RATIO^(SINC2_ORDER-1) (32 at
// the defaults) over the input; its latency is fixed. rst_n is synchronous and
// active low.
module hbiir_top
  import hbiir_pkg::*;
#(
  parameter mult_kind_e  MULT        = MULT_WALLACE,
  parameter int unsigned SINC3_ORDER = 3,
  parameter int unsigned SINC3_RATIO = 2,
  parameter int unsigned SINC2_ORDER = 2,
  parameter int unsigned SINC2_RATIO = 8,
  localparam int unsigned S3_W  = DATA_W + (SINC3_ORDER - 1) * $clog2(SINC3_RATIO),
  localparam int unsigned OUT_W = S3_W + (SINC2_ORDER - 1) * $clog2(SINC2_RATIO)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // interpolation chain
  input  hb_coef_t                 hb1_coef,
  input  hb_coef_t                 hb2_coef,
  input  logic signed [DATA_W-1:0] x,
  output logic                     x_take,
  output logic signed [OUT_W-1:0]  y,
  output logic                     y_valid,
  // single-rate half-band filter
  input  hb_coef_t                 flt_coef,
  input  logic                     flt_en,
  input  logic signed [DATA_W-1:0] flt_x,
  output logic signed [DATA_W:0]   flt_y,
  // half-band decimator
  input  hb_coef_t                 dec_coef,
  input  logic                     dec_x_valid,
  input  logic signed [DATA_W-1:0] dec_x,
  output logic signed [DATA_W:0]   dec_y,
  output logic                     dec_y_valid
);

  // ---------------------------------------------------------------- rates
  localparam int unsigned P_S3  = SINC2_RATIO;         // sinc^3 output period
  localparam int unsigned P_HB2 = P_S3 * SINC3_RATIO;  // 2nd half-band output period
  localparam int unsigned P_HB1 = P_HB2 * 2;           // 1st half-band output period
  localparam int unsigned P_IN  = P_HB1 * 2;           // input period (64 cycles)
  localparam int unsigned CNT_W = (P_IN > 1) ? $clog2(P_IN) : 1;

  logic [CNT_W-1:0] cnt;
  logic ce_hb1, ce_hb2, ce_s3;

  always_ff @(posedge clk) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= (cnt == CNT_W'(P_IN - 1)) ? '0 : cnt + 1'b1;
  end

  assign ce_hb1 = (cnt % CNT_W'(P_HB1)) == '0;
  assign ce_hb2 = (cnt % CNT_W'(P_HB2)) == '0;
  assign ce_s3  = (cnt % CNT_W'(P_S3))  == '0;

  // ---------------------------------------------------------------- chain
  logic signed [DATA_W-1:0] hb1_y, hb2_y;
  logic signed [S3_W-1:0]   s3_y;
  logic hb1_y_valid, hb2_y_valid, s3_y_valid;
  logic hb2_take, s3_take, s2_take;

  hb_interp #(.MULT(MULT)) u_hb1 (
    .clk (clk), .rst_n (rst_n), .ce (ce_hb1),
    .a0 (hb1_coef.a0), .a1 (hb1_coef.a1),
    .x (x), .x_take (x_take), .y (hb1_y), .y_valid (hb1_y_valid)
  );

  hb_interp #(.MULT(MULT)) u_hb2 (
    .clk (clk), .rst_n (rst_n), .ce (ce_hb2),
    .a0 (hb2_coef.a0), .a1 (hb2_coef.a1),
    .x (hb1_y), .x_take (hb2_take), .y (hb2_y), .y_valid (hb2_y_valid)
  );

  sinc_interp #(.IN_W(DATA_W), .ORDER(SINC3_ORDER), .RATIO(SINC3_RATIO)) u_sinc3 (
    .clk (clk), .rst_n (rst_n), .ce (ce_s3),
    .x (hb2_y), .x_take (s3_take), .y (s3_y), .y_valid (s3_y_valid)
  );

  sinc_interp #(.IN_W(S3_W), .ORDER(SINC2_ORDER), .RATIO(SINC2_RATIO)) u_sinc2 (
    .clk (clk), .rst_n (rst_n), .ce (1'b1),
    .x (s3_y), .x_take (s2_take), .y (y), .y_valid (y_valid)
  );

  // The counter already schedules every stage, so the inner stages' valid
  // and take flags are not needed; they are gathered here only to be read.
  logic unused_valid;
  assign unused_valid = ^{hb1_y_valid, hb2_y_valid, s3_y_valid, hb2_take, s3_take, s2_take};

  // ---------------------------------------------------------------- side blocks
  hb_iir_filter #(.MULT(MULT)) u_flt (
    .clk (clk), .rst_n (rst_n), .en (flt_en),
    .a0 (flt_coef.a0), .a1 (flt_coef.a1), .x (flt_x), .y (flt_y)
  );

  hb_decim #(.MULT(MULT)) u_dec (
    .clk (clk), .rst_n (rst_n), .x_valid (dec_x_valid),
    .a0 (dec_coef.a0), .a1 (dec_coef.a1), .x (dec_x),
    .y (dec_y), .y_valid (dec_y_valid)
  );

endmodule
