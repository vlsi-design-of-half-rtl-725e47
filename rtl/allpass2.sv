// allpass2: second-order all-pass filter cell with one multiplier.
//
// Transfer function A(z) = (a + z^-D) / (1 + a z^-D), realised with one
// multiplier and two adders:
//     y[n] = a * (x[n] - y[n-D]) + x[n-D]
// The first adder forms the difference of the new input and the delayed
// output, the multiplier scales it by the coefficient a, the second adder
// adds the delayed input. With D = 2 the cell is the second-order all-pass
// of a half-band filter running at the high rate (two delay registers on each
// path); with D = 1 it is the same cell moved in front of a rate change, where
// it runs at the low rate with single delays (polyphase form).
//
// Arithmetic (this design's choices): samples are DATA_W-bit two's
// complement, a is COEF_W-bit Q1.15. The difference is saturated to DATA_W
// bits before the DATA_W x COEF_W multiplier, the 32-bit product is shifted
// right by 15 bits with truncation (rounding toward minus infinity), and the
// output sum is saturated to DATA_W bits. Saturation keeps the recursion
// stable when a full-scale input drives the cell past full scale.
//
// MULT selects the multiplier: Wallace tree (default) or carry-save array.
//
// Interface: x and coef are sampled, and the delay registers advance, on a
// rising clk edge with en high. y is combinational from x, coef and the
// registers (the multiplier is inside the single-cycle path); it is the output
// for the sample now on x. Reset (rst_n low, synchronous) clears the
// registers.
module allpass2
  import hbiir_pkg::*;
#(
  parameter int unsigned D    = 2,
  parameter mult_kind_e  MULT = MULT_WALLACE
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [COEF_W-1:0] coef,
  input  logic signed [DATA_W-1:0] x,
  output logic signed [DATA_W-1:0] y
);

  localparam int unsigned PW = DATA_W + COEF_W;

  // Delay lines: index 0 is z^-1, index D-1 is z^-D.
  logic signed [DATA_W-1:0] xd [D];
  logic signed [DATA_W-1:0] yd [D];

  logic signed [DATA_W-1:0] diff;
  logic signed [PW-1:0]     prod;
  logic signed [DATA_W+1:0] prod_scaled;

  assign diff = sat_data((DATA_W+2)'(x) - (DATA_W+2)'(yd[D-1]));

  if (MULT == MULT_ARRAY) begin : g_array
    array_mult #(.AW(DATA_W), .BW(COEF_W), .SIGNED(1'b1)) u_mult (
      .a (diff),
      .b (coef),
      .p (prod)
    );
  end else begin : g_wallace
    wallace_mult #(.AW(DATA_W), .BW(COEF_W), .SIGNED(1'b1)) u_mult (
      .a (diff),
      .b (coef),
      .p (prod)
    );
  end

  // |prod| <= 2^30, so the scaled product fits DATA_W+2 bits.
  assign prod_scaled = (DATA_W+2)'(prod >>> COEF_FRAC);
  assign y = sat_data(prod_scaled + (DATA_W+2)'(xd[D-1]));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(D); i++) begin
        xd[i] <= '0;
        yd[i] <= '0;
      end
    end else if (en) begin
      xd[0] <= x;
      yd[0] <= y;
      for (int i = 1; i < int'(D); i++) begin
        xd[i] <= xd[i-1];
        yd[i] <= yd[i-1];
      end
    end
  end

endmodule
