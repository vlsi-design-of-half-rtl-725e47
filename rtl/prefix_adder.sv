// prefix_adder: Kogge-Stone parallel-prefix adder.
//
// Generate and propagate signals are combined over log2(W) prefix levels, so
// the carry into every bit is known after a logarithmic number of gate levels
// instead of rippling through all bits. It serves as the fast carry-propagate
// adder that finishes the Wallace tree multiplier; which fast adder to use is
// this design's choice.
//
// Interface: s = a + b modulo 2^W (the carry out is dropped).
// Timing: purely combinational.
module prefix_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);

  localparam int unsigned LEVELS = (W > 1) ? $clog2(W) : 1;

  logic [LEVELS:0][W-1:0]   g;
  logic [LEVELS-1:0][W-1:0] p;   // the last level's group propagate is never needed

  assign g[0] = a & b;
  assign p[0] = a ^ b;

  for (genvar l = 0; l < int'(LEVELS); l++) begin : g_level
    for (genvar k = 0; k < int'(W); k++) begin : g_bit
      if (k >= (1 << l)) begin : g_merge
        assign g[l+1][k] = g[l][k] | (p[l][k] & g[l][k - (1 << l)]);
        if (l + 1 < int'(LEVELS)) begin : g_p
          assign p[l+1][k] = p[l][k] & p[l][k - (1 << l)];
        end
      end else begin : g_keep
        assign g[l+1][k] = g[l][k];
        if (l + 1 < int'(LEVELS)) begin : g_p
          assign p[l+1][k] = p[l][k];
        end
      end
    end
  end

  // carry into bit k is the group generate of bits k-1..0
  assign s = p[0] ^ {g[LEVELS][W-2:0], 1'b0};

endmodule
