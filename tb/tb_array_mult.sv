// tb_array_mult: self-checking testbench of the array multiplier.
// Compares the product with the * operator for corner values and random
// operands, in the signed (16 x 16) and unsigned (4 x 4 and 16 x 16) forms.
module tb_array_mult;

  int checks = 0;
  int failures = 0;

  logic [15:0] a16, b16;
  logic [31:0] ps16, pu16;
  logic [3:0]  a4, b4;
  logic [7:0]  pu4;

  array_mult #(.AW(16), .BW(16), .SIGNED(1'b1)) u_s16 (.a(a16), .b(b16), .p(ps16));
  array_mult #(.AW(16), .BW(16), .SIGNED(1'b0)) u_u16 (.a(a16), .b(b16), .p(pu16));
  array_mult #(.AW(4),  .BW(4),  .SIGNED(1'b0)) u_u4  (.a(a4),  .b(b4),  .p(pu4));

  task automatic check16(input logic [15:0] a, input logic [15:0] b);
    logic signed [31:0] exp_s;
    logic [31:0]        exp_u;
    a16 = a;
    b16 = b;
    #1;
    exp_s = $signed(a) * $signed(b);
    exp_u = a * b;
    checks += 2;
    if (ps16 !== exp_s) begin
      failures++;
      $display("FAIL signed %0d * %0d = %0d, expected %0d", $signed(a), $signed(b), $signed(ps16), exp_s);
    end
    if (pu16 !== exp_u) begin
      failures++;
      $display("FAIL unsigned %0d * %0d = %0d, expected %0d", a, b, pu16, exp_u);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [15:0] corners [8] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h7FFF,
                                 16'h8000, 16'h8001, 16'h5555, 16'hAAAA};
    // exhaustive 4 x 4 unsigned, the size of the textbook array
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i);
        b4 = 4'(j);
        #1;
        checks++;
        if (pu4 !== 8'(i * j)) begin
          failures++;
          $display("FAIL 4x4 %0d * %0d = %0d", i, j, pu4);
        end
      end
    foreach (corners[i]) foreach (corners[j]) check16(corners[i], corners[j]);
    for (int n = 0; n < 3000; n++) check16(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
