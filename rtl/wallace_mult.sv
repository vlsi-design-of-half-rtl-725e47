// wallace_mult: Wallace tree multiplier.
//
// Three stages:
//   1. Partial-product generation: every bit of the multiplicand is ANDed with
//      every bit of the multiplier (mult_pp_gen), one shifted row per
//      multiplier bit.
//   2. Reduction: the rows are taken in groups of three; each group passes
//      through a layer of full adders (3:2 counters) working column by column
//      and becomes two rows, a sum row and a carry row shifted one place left.
//      Rows left over when the count is not a multiple of three pass on
//      unchanged. Layers repeat until only two rows remain. A full adder in a
//      column where one of its three inputs is structurally zero is a half
//      adder, and synthesis reduces it to one; a column holding a single bit
//      just passes it on. The full adders are written a whole row at a time.
//   3. Final addition: the two rows are added by a fast carry-propagate adder,
//      here a Kogge-Stone prefix adder (prefix_adder).
// The number of reduction layers is worked out at elaboration from the row
// count (16 rows plus a constant row need 6 layers).
//
// SIGNED selects unsigned or two's complement operands; the signed form
// (Baugh-Wooley partial products) is this design's choice so that it can
// serve the signed filter datapath.
//
// Interface: a (AW bits) times b (BW bits) gives p (AW+BW bits).
// Timing: purely combinational, no clock.
module wallace_mult #(
  parameter int unsigned AW     = 16,
  parameter int unsigned BW     = 16,
  parameter bit          SIGNED = 1'b1,
  localparam int unsigned PW    = AW + BW
) (
  input  logic [AW-1:0] a,
  input  logic [BW-1:0] b,
  output logic [PW-1:0] p
);

  localparam int unsigned R0 = BW + 1;  // partial-product rows incl. constant row

  // Rows left after one 3:2 layer applied to r rows.
  function automatic int unsigned rows_after(input int unsigned r);
    return (r / 3) * 2 + (r % 3);
  endfunction

  function automatic int unsigned rows_at(input int unsigned stage);
    int unsigned r;
    r = R0;
    for (int unsigned s = 0; s < stage; s++) r = rows_after(r);
    return r;
  endfunction

  function automatic int unsigned num_stages();
    int unsigned r, n;
    r = R0;
    n = 0;
    while (r > 2) begin
      r = rows_after(r);
      n++;
    end
    return n;
  endfunction

  localparam int unsigned NST = num_stages();

  logic [BW:0][PW-1:0] pp;

  mult_pp_gen #(.AW(AW), .BW(BW), .SIGNED(SIGNED)) u_pp (
    .a    (a),
    .b    (b),
    .rows (pp)
  );

  // Each reduction layer s takes the RI rows rin and produces the RO rows
  // rout for the next layer.
  for (genvar s = 0; s < int'(NST); s++) begin : g_stage
    localparam int unsigned RI = rows_at(s);
    localparam int unsigned G  = RI / 3;        // full groups of three rows
    localparam int unsigned RO = rows_after(RI);
    logic [RI-1:0][PW-1:0] rin;
    logic [RO-1:0][PW-1:0] rout;
    if (s == 0) begin : g_first
      assign rin = pp;
    end else begin : g_next
      assign rin = g_stage[s-1].rout;
    end
    for (genvar k = 0; k < int'(RO); k++) begin : g_row
      if (k < 2 * G) begin : g_csa
        localparam int unsigned B = 3 * (k / 2);  // first row of the group
        if (k % 2 == 0) begin : g_sum
          assign rout[k] = rin[B] ^ rin[B+1] ^ rin[B+2];
        end else begin : g_carry
          assign rout[k] = ((rin[B] & rin[B+1])
                          | (rin[B] & rin[B+2])
                          | (rin[B+1] & rin[B+2])) << 1;
        end
      end else begin : g_pass
        assign rout[k] = rin[3 * G + (k - 2 * G)];
      end
    end
  end

  // The two rows left after the last layer go to the final adder.
  logic [PW-1:0] fin_a, fin_b;
  if (NST == 0) begin : g_no_tree
    assign fin_a = pp[0];
    assign fin_b = pp[1];
  end else begin : g_tree
    assign fin_a = g_stage[NST-1].rout[0];
    assign fin_b = g_stage[NST-1].rout[1];
  end

  prefix_adder #(.W(PW)) u_cpa (
    .a (fin_a),
    .b (fin_b),
    .s (p)
  );

endmodule
