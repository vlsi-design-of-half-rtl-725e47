// hb_interp: polyphase half-band IIR interpolator by two.
//
// The half-band filter H(z) = A0(z^2) + z^-1 A1(z^2) after a zero-stuffing
// up-sampler is rearranged so that both all-pass branches run at the low
// (input) rate: each input sample goes to branch 0 and branch 1 in parallel
// (cascades of K0 and K1 allpass2 cells with single delays, D = 1; one
// section per branch by default, coefficients a0[k] and a1[k]), and a
// commutator at the output sends first the branch-0 result and then the
// branch-1 result. Each input
// sample thus yields two output samples, and no multiplier ever works on a
// stuffed zero. The output has unity gain at DC.
//
// Timing: ce marks the cycles of the output (high) rate; it may be high every
// cycle. A phase bit toggles on every ce. On a ce with phase 0 (x_take high)
// x is taken, both branches advance, y becomes the branch-0 output and the
// branch-1 output is held; on the next ce (phase 1) y becomes the held
// branch-1 output. y is registered and is valid one cycle after each ce,
// marked by y_valid. The input must be steady whenever x_take is high.
// Handing the input over through a phase bit and clock enables is this
// design's choice. rst_n is synchronous and active low; after reset the first
// ce takes an input.
module hb_interp
  import hbiir_pkg::*;
#(
  parameter mult_kind_e  MULT = MULT_WALLACE,
  parameter int unsigned K0   = 1,
  parameter int unsigned K1   = 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ce,
  input  logic [K0-1:0][COEF_W-1:0] a0,
  input  logic [K1-1:0][COEF_W-1:0] a1,
  input  logic signed [DATA_W-1:0] x,
  output logic                     x_take,
  output logic signed [DATA_W-1:0] y,
  output logic                     y_valid
);

  logic phase;
  logic branch_en;
  logic signed [DATA_W-1:0] y0, y1, y1_hold;

  assign x_take    = ce & ~phase;
  assign branch_en = x_take;

  allpass_branch #(.K(K0), .D(1), .MULT(MULT)) u_h0 (
    .clk (clk), .rst_n (rst_n), .en (branch_en), .coef (a0), .x (x), .y (y0)
  );

  allpass_branch #(.K(K1), .D(1), .MULT(MULT)) u_h1 (
    .clk (clk), .rst_n (rst_n), .en (branch_en), .coef (a1), .x (x), .y (y1)
  );

  // Output commutator.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase   <= 1'b0;
      y1_hold <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= ce;
      if (ce) begin
        phase <= ~phase;
        if (!phase) begin
          y       <= y0;
          y1_hold <= y1;
        end else begin
          y       <= y1_hold;
        end
      end
    end
  end

endmodule
