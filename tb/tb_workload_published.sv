// tb_workload_published: the two published simulation set-ups of the
// single-rate half-band IIR filter, one with the array multiplier and one
// with the Wallace tree multiplier. Each filter gets a constant 16-bit input
// with its own coefficient pair (array: x = 0x5555, a0 = 0x1EFF, a1 = 0x3F6A;
// Wallace: x = 0x557F, a0 = 0x1AC8, a1 = 0x3383) from reset on. Every output
// is compared with the integer model, and the settled output must be twice
// the input (the half-band filter's DC gain). A short random stream with the
// same coefficients follows, to cover more than the constant case.
// For the Wallace set-up the published waveform also prints the two 32-bit
// products of the first sample after reset, x*a0 = 00001000111100011011000100111000
// and x*a1 = 00010001001101000000110011111101 (the delay lines are still zero,
// so each all-pass multiplier sees the input itself); the products inside the
// Wallace filter are compared with them.
module tb_workload_published;
  import hbiir_pkg::*;
  import hbiir_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic signed [15:0] xa, xw;
  logic signed [16:0] ya, yw;
  localparam logic signed [15:0] A0_ARR = 16'sh1EFF, A1_ARR = 16'sh3F6A;
  localparam logic signed [15:0] A0_WAL = 16'sh1AC8, A1_WAL = 16'sh3383;

  always #5 clk = ~clk;

  hb_iir_filter #(.MULT(MULT_ARRAY)) u_arr (
    .clk(clk), .rst_n(rst_n), .en(en), .a0(A0_ARR), .a1(A1_ARR), .x(xa), .y(ya));
  hb_iir_filter #(.MULT(MULT_WALLACE)) u_wal (
    .clk(clk), .rst_n(rst_n), .en(en), .a0(A0_WAL), .a1(A1_WAL), .x(xw), .y(yw));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ap_model a0m, a1m, w0m, w1m;
    int a1d, w1d, ea, ew;
    a0m = new(2, int'(A0_ARR));
    a1m = new(2, int'(A1_ARR));
    w0m = new(2, int'(A0_WAL));
    w1m = new(2, int'(A1_WAL));
    a1d = 0;
    w1d = 0;
    xa = '0;
    xw = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 1200; n++) begin
      en = 1'b1;
      if (n < 400) begin
        xa = 16'sh5555;
        xw = 16'sh557F;
      end else begin
        xa = 16'($urandom);
        xw = 16'($urandom);
      end
      if (n == 0) begin
        #1;
        checks += 2;
        if (u_wal.u_h0.g_sec[0].u_sec.prod !== 32'b00001000111100011011000100111000) begin
          failures++;
          $display("FAIL first product of branch 0: %b", u_wal.u_h0.g_sec[0].u_sec.prod);
        end
        if (u_wal.u_h1.g_sec[0].u_sec.prod !== 32'b00010001001101000000110011111101) begin
          failures++;
          $display("FAIL first product of branch 1: %b", u_wal.u_h1.g_sec[0].u_sec.prod);
        end
      end
      ea = a0m.step(int'(xa)) + a1d;
      a1d = a1m.step(int'(xa));
      ew = w0m.step(int'(xw)) + w1d;
      w1d = w1m.step(int'(xw));
      @(posedge clk);
      #1;
      checks += 2;
      if (int'(ya) !== ea) begin
        failures++;
        if (failures < 10) $display("FAIL array n=%0d y=%0d expected %0d", n, ya, ea);
      end
      if (int'(yw) !== ew) begin
        failures++;
        if (failures < 10) $display("FAIL wallace n=%0d y=%0d expected %0d", n, yw, ew);
      end
      if (n == 399) begin
        $display("settled outputs: array %0d (input %0d), Wallace %0d (input %0d)", ya, 16'sh5555, yw, 16'sh557F);
        checks += 2;
        if (int'(ya) > 2 * 16'sh5555 + 2 || int'(ya) < 2 * 16'sh5555 - 2) begin
          failures++;
          $display("FAIL array DC gain");
        end
        if (int'(yw) > 2 * 16'sh557F + 2 || int'(yw) < 2 * 16'sh557F - 2) begin
          failures++;
          $display("FAIL Wallace DC gain");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
