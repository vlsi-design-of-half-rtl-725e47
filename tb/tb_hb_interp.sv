// tb_hb_interp: self-checking testbench of the polyphase half-band IIR
// interpolator. The output-rate enable ce is driven either every cycle or at
// random. Every input the interpolator takes (x_take) goes through two integer
// all-pass models; the branch-0 result must appear on the next y_valid and the
// branch-1 result on the one after. The rate is checked (x_take on every
// second ce only, two outputs per input) and a constant input must come out
// unchanged at the output rate (unity DC gain). A second interpolator with
// two sections per branch (array multipliers) runs on the same ce and input
// and is compared with cascaded models.
module tb_hb_interp;
  import hbiir_pkg::*;
  import hbiir_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic ce = 1'b0;
  logic signed [15:0] a0, a1, x;
  logic x_take, y_valid;
  logic signed [15:0] y;

  always #5 clk = ~clk;

  hb_interp #(.MULT(MULT_WALLACE)) u_dut (
    .clk(clk), .rst_n(rst_n), .ce(ce), .a0(a0), .a1(a1), .x(x),
    .x_take(x_take), .y(y), .y_valid(y_valid));

  logic [1:0][15:0] ka0, ka1;
  logic k_take, k_valid;
  logic signed [15:0] ky;

  hb_interp #(.MULT(MULT_ARRAY), .K0(2), .K1(2)) u_k (
    .clk(clk), .rst_n(rst_n), .ce(ce), .a0(ka0), .a1(ka1), .x(x),
    .x_take(k_take), .y(ky), .y_valid(k_valid));

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    rst_n = 1'b0;
    ce = 1'b0;
    x = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
  endtask

  // One run of n cycles. mode 0: ce every cycle; 1: random ce.
  // dc >= 0: constant input dc, checked for unity gain at the end.
  task automatic run(input int mode, input int n, input int dc);
    ap_model m0, m1;
    ap_model k0 [2];
    ap_model k1 [2];
    int kexpq[$];
    int v;
    int expq[$];
    int n_ce, n_take, n_out, e;
    do_reset();
    m0 = new(1, int'(a0));
    m1 = new(1, int'(a1));
    foreach (k0[i]) k0[i] = new(1, int'($signed(ka0[i])));
    foreach (k1[i]) k1[i] = new(1, int'($signed(ka1[i])));
    n_ce = 0;
    n_take = 0;
    n_out = 0;
    for (int i = 0; i < n; i++) begin
      ce = (mode == 0) ? 1'b1 : (($urandom % 3) == 0);
      if (dc >= 0) x = 16'(dc);
      else if ($urandom % 8 == 0) x = ($urandom % 2 == 1) ? 16'sh7FFF : 16'sh8000;
      else x = 16'($urandom);
      #1;
      if (ce) begin
        checks++;
        if (x_take !== ((n_ce % 2) == 0)) begin
          failures++;
          $display("FAIL x_take=%0b on ce %0d", x_take, n_ce);
        end
        n_ce++;
      end
      if (x_take) begin
        n_take++;
        expq.push_back(m0.step(int'(x)));
        expq.push_back(m1.step(int'(x)));
        v = int'(x);
        foreach (k0[i]) v = k0[i].step(v);
        kexpq.push_back(v);
        v = int'(x);
        foreach (k1[i]) v = k1[i].step(v);
        kexpq.push_back(v);
      end
      @(posedge clk);
      #1;
      if (k_valid) begin
        e = kexpq.pop_front();
        checks++;
        if (int'(ky) !== e) begin
          failures++;
          if (failures < 10) $display("FAIL K=2 mode %0d: y=%0d expected %0d", mode, ky, e);
        end
        if (dc >= 0 && n_out > 100) begin
          checks++;
          if (int'(ky) > dc + 4 || int'(ky) < dc - 4) begin
            failures++;
            $display("FAIL K=2 DC gain: y=%0d for constant %0d", ky, dc);
          end
        end
      end
      if (y_valid) begin
        n_out++;
        e = expq.pop_front();
        checks++;
        if (int'(y) !== e) begin
          failures++;
          if (failures < 10) $display("FAIL mode %0d out %0d: y=%0d expected %0d", mode, n_out, y, e);
        end
        if (dc >= 0 && n_out > 100) begin
          checks++;
          if (int'(y) > dc + 2 || int'(y) < dc - 2) begin
            failures++;
            $display("FAIL DC gain: y=%0d for constant %0d", y, dc);
          end
        end
      end
    end
    // rate: two outputs per input sample
    checks++;
    if (n_out !== n_ce || (n_take * 2 !== n_ce && n_take * 2 !== n_ce + 1)) begin
      failures++;
      $display("FAIL rate: %0d ce, %0d inputs, %0d outputs", n_ce, n_take, n_out);
    end
  endtask

  initial begin
    ka0 = {16'sh6000, 16'sh1EFF};
    ka1 = {16'shC000, 16'sh3F6A};
    a0 = 16'sh1EFF;
    a1 = 16'sh3F6A;
    run(0, 400, 12345);
    run(0, 3000, -1);
    a0 = 16'sh1AC8;
    a1 = 16'sh3383;
    run(1, 3000, -1);
    a0 = 16'($urandom);
    a1 = 16'($urandom);
    ka0 = {16'($urandom), 16'($urandom)};
    ka1 = {16'($urandom), 16'($urandom)};
    run(1, 3000, -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
