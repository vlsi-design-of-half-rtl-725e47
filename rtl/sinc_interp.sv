// sinc_interp: sinc^N (cascaded integrator-comb) interpolator by RATIO.
//
// The later stages of the interpolation chain raise the rate with sinc
// filters, whose transfer function is
//     H(z) = ((1 - z^-RATIO) / (1 - z^-1))^ORDER,
// the ORDER-fold cascade of a RATIO-tap moving sum. It is built without
// multipliers in the usual integrator-comb form (this design's choice of
// structure): ORDER first-difference combs at the input (low) rate, a
// zero-stuffing up-sampler, and ORDER accumulators at the output (high) rate.
// The DC gain is RATIO^(ORDER-1). All registers are OUT_W bits wide, enough
// for the largest output; intermediate values may wrap around, which two's
// complement arithmetic undoes by the output.
//
// Timing: ce marks the output-rate cycles. A counter runs from 0 to RATIO-1
// on each ce; on a ce with count 0 (x_take high) x is taken and passes the
// combs. Every ce moves the accumulators and updates the registered output y,
// flagged by y_valid one cycle after the ce. rst_n is synchronous and active
// low; after reset the first ce takes an input.
module sinc_interp #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned ORDER = 3,
  parameter int unsigned RATIO = 2,
  localparam int unsigned OUT_W = IN_W + (ORDER - 1) * $clog2(RATIO),
  localparam int unsigned CW    = (RATIO > 1) ? $clog2(RATIO) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ce,
  input  logic signed [IN_W-1:0]  x,
  output logic                    x_take,
  output logic signed [OUT_W-1:0] y,
  output logic                    y_valid
);

  logic [CW-1:0] cnt;
  assign x_take = ce && (cnt == '0);

  // Comb section (input rate): c[k] = c[k-1] - c[k-1] delayed by one input.
  logic signed [OUT_W-1:0] c [ORDER+1];
  logic signed [OUT_W-1:0] c_d [ORDER];
  assign c[0] = OUT_W'(x);
  for (genvar k = 1; k <= int'(ORDER); k++) begin : g_comb
    assign c[k] = c[k-1] - c_d[k-1];
  end

  // Up-sampler (zero stuffing) and integrator section (output rate).
  logic signed [OUT_W-1:0] u;
  logic signed [OUT_W-1:0] acc [ORDER];
  logic signed [OUT_W-1:0] acc_n [ORDER+1];
  assign u        = x_take ? c[ORDER] : '0;
  assign acc_n[0] = u;
  for (genvar k = 1; k <= int'(ORDER); k++) begin : g_integ
    assign acc_n[k] = acc[k-1] + acc_n[k-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt     <= '0;
      y       <= '0;
      y_valid <= 1'b0;
      for (int k = 0; k < int'(ORDER); k++) begin
        c_d[k] <= '0;
        acc[k] <= '0;
      end
    end else begin
      y_valid <= ce;
      if (ce) begin
        cnt <= (cnt == CW'(RATIO - 1)) ? '0 : cnt + 1'b1;
        for (int k = 0; k < int'(ORDER); k++) acc[k] <= acc_n[k+1];
        y <= acc_n[ORDER];
      end
      if (x_take) begin
        for (int k = 0; k < int'(ORDER); k++) c_d[k] <= c[k];
      end
    end
  end

endmodule
