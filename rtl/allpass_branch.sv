// allpass_branch: one branch of a half-band IIR filter, a cascade of K
// second-order all-pass sections.
//
// A branch realises the product of K sections (a_k + z^-D) / (1 + a_k z^-D),
// k = 1..K, by chaining K allpass2 cells: the output of cell k is the input of
// cell k+1. All cells share the sample enable, so the whole cascade answers
// within the cycle the sample arrives in (the K multipliers lie in series on
// one combinational path). Coefficient k sits in coef[k-1].
//
// Interface and timing are those of allpass2: x and coef are taken on a rising
// clk edge with en high, y is combinational for the sample now on x.
module allpass_branch
  import hbiir_pkg::*;
#(
  parameter int unsigned K    = 1,
  parameter int unsigned D    = 2,
  parameter mult_kind_e  MULT = MULT_WALLACE
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          en,
  input  logic [K-1:0][COEF_W-1:0]      coef,
  input  logic signed [DATA_W-1:0]      x,
  output logic signed [DATA_W-1:0]      y
);

  logic signed [DATA_W-1:0] s [K+1];   // s[0] = x, s[k] = output of section k

  assign s[0] = x;

  for (genvar k = 0; k < int'(K); k++) begin : g_sec
    allpass2 #(.D(D), .MULT(MULT)) u_sec (
      .clk (clk), .rst_n (rst_n), .en (en),
      .coef (coef[k]), .x (s[k]), .y (s[k+1])
    );
  end

  assign y = s[K];

endmodule
