// hb_iir_filter: single-rate half-band IIR filter built from two all-pass
// branches in parallel.
//
//     H(z) = A0(z^2) + z^-1 A1(z^2),
//     Ai(z^2) = product over k of (ai,k + z^-2) / (1 + ai,k z^-2)
//
// The input feeds both branches. Branch 0 is a cascade of K0 second-order
// all-pass cells with double delays (allpass_branch of allpass2, D = 2);
// branch 1 is a cascade of K1 such cells followed by one extra sample delay.
// An adder sums the two branch outputs. The default of one section per
// branch (K0 = K1 = 1) gives a fifth-order half-band filter with only two
// multipliers. The coefficients are inputs, a0[k] for section k of branch 0
// and a1[k] for branch 1, so one circuit serves any filter of this form.
//
// The filter runs at the high sample rate (one sample per en). Its DC gain is
// 2, as the formula gives; the output keeps the full DATA_W+1 bit sum, and a
// user wanting unity gain takes its upper DATA_W bits. Keeping the full sum
// and registering it is this design's choice.
//
// Interface: on a rising clk edge with en high, x is taken and y updated to
// the filter output for that sample (one cycle of latency, y is registered).
// rst_n is synchronous and active low.
module hb_iir_filter
  import hbiir_pkg::*;
#(
  parameter mult_kind_e  MULT = MULT_WALLACE,
  parameter int unsigned K0   = 1,
  parameter int unsigned K1   = 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic [K0-1:0][COEF_W-1:0] a0,
  input  logic [K1-1:0][COEF_W-1:0] a1,
  input  logic signed [DATA_W-1:0] x,
  output logic signed [DATA_W:0]   y
);

  logic signed [DATA_W-1:0] y0, y1, y1_d;

  allpass_branch #(.K(K0), .D(2), .MULT(MULT)) u_h0 (
    .clk (clk), .rst_n (rst_n), .en (en), .coef (a0), .x (x), .y (y0)
  );

  allpass_branch #(.K(K1), .D(2), .MULT(MULT)) u_h1 (
    .clk (clk), .rst_n (rst_n), .en (en), .coef (a1), .x (x), .y (y1)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y1_d <= '0;
      y    <= '0;
    end else if (en) begin
      y1_d <= y1;                                   // z^-1 in branch 1
      y    <= (DATA_W+1)'(y0) + (DATA_W+1)'(y1_d);  // output adder
    end
  end

endmodule
