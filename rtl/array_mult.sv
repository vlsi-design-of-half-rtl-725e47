// array_mult: carry-save array multiplier.
//
// The multiplicand is ANDed with each multiplier bit to give one shifted
// partial product per multiplier bit (mult_pp_gen). The partial products are
// then added one row after another by a linear array of carry-save adder rows:
// every row of full adders takes the running sum vector, the running carry
// vector and the next partial product, and passes its sum and carry bits on to
// the next row. After the last row a ripple-carry adder merges the sum and
// carry vectors into the product. This is the classic array structure:
// one adder row per multiplier bit, with carry-save rows in place of
// carry-propagate rows and a ripple-carry adder at the end.
//
// SIGNED selects unsigned or two's complement operands; the signed form
// (Baugh-Wooley partial products, one extra constant row) is this design's
// choice so that it can serve the signed filter datapath.
//
// Interface: a (AW bits) times b (BW bits) gives p (AW+BW bits).
// Timing: purely combinational, no clock.
module array_mult #(
  parameter int unsigned AW     = 16,
  parameter int unsigned BW     = 16,
  parameter bit          SIGNED = 1'b1,
  localparam int unsigned PW    = AW + BW
) (
  input  logic [AW-1:0] a,
  input  logic [BW-1:0] b,
  output logic [PW-1:0] p
);

  logic [BW:0][PW-1:0] rows;

  mult_pp_gen #(.AW(AW), .BW(BW), .SIGNED(SIGNED)) u_pp (
    .a    (a),
    .b    (b),
    .rows (rows)
  );

  // Carry-save adder rows: sum/carry vectors after each row.
  logic [BW:0][PW-1:0] s_row, c_row;

  assign s_row[0] = rows[0];
  assign c_row[0] = '0;

  for (genvar r = 1; r <= int'(BW); r++) begin : g_row
    // one full adder per column
    assign s_row[r] = s_row[r-1] ^ c_row[r-1] ^ rows[r];
    assign c_row[r] = ((s_row[r-1] & c_row[r-1])
                     | (s_row[r-1] & rows[r])
                     | (c_row[r-1] & rows[r])) << 1;
  end

  // Final ripple-carry adder: the carry passes from bit to bit (the carry out
  // of the top bit is dropped, the product being AW+BW bits wide).
  logic [PW-1:0] rc;
  assign rc[0] = 1'b0;

  for (genvar k = 0; k < int'(PW); k++) begin : g_rca
    assign p[k] = s_row[BW][k] ^ c_row[BW][k] ^ rc[k];
    if (k + 1 < int'(PW)) begin : g_carry
      assign rc[k+1] = (s_row[BW][k] & c_row[BW][k]) | (rc[k] & (s_row[BW][k] ^ c_row[BW][k]));
    end
  end

endmodule
