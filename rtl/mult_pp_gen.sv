// mult_pp_gen: partial-product generator shared by the array and Wallace
// tree multipliers.
//
// Row i holds multiplicand a ANDed with multiplier bit b[i], shifted left by
// i bit positions, so that the rows only have to be added. This is the
// partial-product generation stage both multipliers start from.
//
// With SIGNED = 0 the operands are unsigned and the last row is zero. With
// SIGNED = 1 the operands are two's complement and the matrix follows the
// Baugh-Wooley scheme (this design's choice, so that the filters can multiply
// signed samples with signed coefficients using only AND gates and adders):
// a partial-product bit is inverted when exactly one of its two operand bits is
// a sign bit, and the last row holds the constant
// 2^(AW-1) + 2^(BW-1) + 2^(AW+BW-1). The rows then sum, modulo 2^(AW+BW), to
// the signed product.
//
// Bits outside a row's span (below bit i, above bit i+AW-1) are constant
// zero; the adders that consume them simplify away in synthesis.
//
// Purely combinational.
module mult_pp_gen #(
  parameter int unsigned AW     = 16,
  parameter int unsigned BW     = 16,
  parameter bit          SIGNED = 1'b1,
  localparam int unsigned PW    = AW + BW
) (
  input  logic [AW-1:0]        a,
  input  logic [BW-1:0]        b,
  output logic [BW:0][PW-1:0]  rows   // BW partial products, then the constant row
);

  always_comb begin
    rows = '0;
    for (int i = 0; i < int'(BW); i++) begin
      for (int j = 0; j < int'(AW); j++) begin
        logic bit_ij;
        bit_ij = a[j] & b[i];
        if (SIGNED && ((j == int'(AW) - 1) != (i == int'(BW) - 1)))
          bit_ij = ~bit_ij;
        rows[i][i+j] = bit_ij;
      end
    end
    if (SIGNED) begin
      rows[BW][AW-1] = 1'b1;
      rows[BW]       = rows[BW] + (PW'(1) << (BW - 1));
      rows[BW][PW-1] = ~rows[BW][PW-1];
    end
  end

endmodule
