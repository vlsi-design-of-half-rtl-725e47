// hb_decim: polyphase half-band IIR decimator by two.
//
// The dual of the interpolator: filtering by H(z) = A0(z^2) + z^-1 A1(z^2)
// and keeping every second output is rearranged so that both all-pass
// branches run at the low (output) rate. An input commutator sends the
// even-numbered input samples to branch 0 and the odd-numbered ones to
// branch 1 (cascades of K0 and K1 allpass2 cells with single delays,
// D = 1; one section per branch by default, coefficients a0[k] and a1[k]);
// the output is
//     y[m] = A0{x[2m]} + A1{x[2m-1]}
// formed by adding the branch-0 result of an even sample to the branch-1
// result of the odd sample before it.
//
// Arithmetic: the sum keeps DATA_W+1 bits, so the DC gain is 2 as in H(z);
// the upper DATA_W bits give unity gain. This, the handshake and the reset
// behaviour are this design's choices.
//
// Timing: one input sample per cycle with x_valid high (the high rate). A
// phase bit, cleared by reset, counts the samples: the first sample after
// reset is sample 0 (even). y is registered and updated, with y_valid pulsed,
// one cycle after each even sample. rst_n is synchronous and active low.
module hb_decim
  import hbiir_pkg::*;
#(
  parameter mult_kind_e  MULT = MULT_WALLACE,
  parameter int unsigned K0   = 1,
  parameter int unsigned K1   = 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     x_valid,
  input  logic [K0-1:0][COEF_W-1:0] a0,
  input  logic [K1-1:0][COEF_W-1:0] a1,
  input  logic signed [DATA_W-1:0] x,
  output logic signed [DATA_W:0]   y,
  output logic                     y_valid
);

  logic phase;   // 0: next sample is even, 1: odd
  logic en0, en1;
  logic signed [DATA_W-1:0] y0, y1, y1_hold;

  assign en0 = x_valid & ~phase;
  assign en1 = x_valid &  phase;

  allpass_branch #(.K(K0), .D(1), .MULT(MULT)) u_h0 (
    .clk (clk), .rst_n (rst_n), .en (en0), .coef (a0), .x (x), .y (y0)
  );

  allpass_branch #(.K(K1), .D(1), .MULT(MULT)) u_h1 (
    .clk (clk), .rst_n (rst_n), .en (en1), .coef (a1), .x (x), .y (y1)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase   <= 1'b0;
      y1_hold <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= en0;
      if (x_valid) phase <= ~phase;
      if (en1) y1_hold <= y1;
      if (en0) y <= (DATA_W+1)'(y0) + (DATA_W+1)'(y1_hold);
    end
  end

endmodule
