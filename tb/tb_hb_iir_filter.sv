// tb_hb_iir_filter: self-checking testbench of the single-rate half-band IIR
// filter. Random samples (some full scale) on random enable cycles are
// compared with a model built from two integer all-pass models, one extra
// delay and a sum, one cycle after each enabled sample. Two tone tests check
// the half-band property independently of the model: a constant input comes
// out doubled (H(1) = 2) and an input alternating in sign at half the sample
// rate is removed (H(-1) = 0), for any coefficients.
module tb_hb_iir_filter;
  import hbiir_pkg::*;
  import hbiir_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic signed [15:0] a0, a1, x;
  logic signed [16:0] y;

  always #5 clk = ~clk;

  hb_iir_filter u_dut (.clk(clk), .rst_n(rst_n), .en(en), .a0(a0), .a1(a1), .x(x), .y(y));

  logic [1:0][15:0] ka0;
  logic [2:0][15:0] ka1;
  logic signed [16:0] ky;

  hb_iir_filter #(.MULT(MULT_ARRAY), .K0(2), .K1(3)) u_k (
    .clk(clk), .rst_n(rst_n), .en(en), .a0(ka0), .a1(ka1), .x(x), .y(ky));

  // cascade model of the K0 = 2, K1 = 3 filter
  ap_model kb0 [2];
  ap_model kb1 [3];
  int ky1_d;

  function automatic int kstep(input int xin);
    int v0, v1, r;
    v0 = xin;
    foreach (kb0[i]) v0 = kb0[i].step(v0);
    v1 = xin;
    foreach (kb1[i]) v1 = kb1[i].step(v1);
    r = v0 + ky1_d;
    ky1_d = v1;
    return r;
  endfunction

  task automatic knew();
    foreach (kb0[i]) kb0[i] = new(2, int'($signed(ka0[i])));
    foreach (kb1[i]) kb1[i] = new(2, int'($signed(ka1[i])));
    ky1_d = 0;
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    rst_n = 1'b0;
    en = 1'b0;
    x = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
  endtask

  // Apply n samples of a tone (0: DC, 1: alternating) at amplitude amp; check
  // the last 20 outputs against target within tol.
  task automatic tone(input int kind, input int amp, input int n, input int target, input int tol);
    do_reset();
    for (int i = 0; i < n; i++) begin
      en = 1'b1;
      x = 16'((kind == 1 && (i % 2 == 1)) ? -amp : amp);
      @(posedge clk);
      #1;
      if (i >= n - 20) begin
        int t = target;
        checks++;
        if (int'(y) > t + tol || int'(y) < t - tol) begin
          failures++;
          $display("FAIL tone kind %0d sample %0d: y=%0d expected %0d +-%0d", kind, i, y, t, tol);
        end
        checks++;
        if (int'(ky) > t + 2 * tol || int'(ky) < t - 2 * tol) begin
          failures++;
          $display("FAIL K=2/3 tone kind %0d sample %0d: y=%0d expected %0d", kind, i, ky, t);
        end
      end
    end
  endtask

  initial begin
    ap_model m0, m1;
    int y1_d, expv, pend;


    a0 = 16'sh1EFF;
    a1 = 16'sh3F6A;
    ka0 = {16'sh1AC8, 16'sh1EFF};
    ka1 = {16'sh6000, 16'sh3383, 16'sh3F6A};
    tone(0, 10000, 200, 20000, 4);
    tone(1, 10000, 200, 0, 4);

    for (int run = 0; run < 3; run++) begin
      case (run)
        0: begin a0 = 16'sh1EFF; a1 = 16'sh3F6A; end
        1: begin a0 = 16'sh1AC8; a1 = 16'sh3383; end
        default: begin a0 = 16'($urandom); a1 = 16'($urandom); end
      endcase
      do_reset();
      m0 = new(2, int'(a0));
      m1 = new(2, int'(a1));
      y1_d = 0;
      if (run == 2) begin
        ka0 = {16'($urandom), 16'($urandom)};
        ka1 = {16'($urandom), 16'($urandom), 16'($urandom)};
      end
      knew();

      pend = 0;
      for (int n = 0; n < 3000; n++) begin
        en = ($urandom % 3) !== 0;
        if ($urandom % 10 == 0) x = ($urandom % 2 == 1) ? 16'sh7FFF : 16'sh8000;
        else                    x = 16'($urandom);
        @(posedge clk);
        #1;
        if (en) begin
          expv = m0.step(int'(x)) + y1_d;
          y1_d = m1.step(int'(x));
          checks++;
          if (int'(y) !== expv) begin
            failures++;
            if (failures < 10) $display("FAIL run %0d n=%0d y=%0d expected %0d", run, n, y, expv);
          end
          expv = kstep(int'(x));
          checks++;
          if (int'(ky) !== expv) begin
            failures++;
            if (failures < 10) $display("FAIL K=2/3 run %0d n=%0d y=%0d expected %0d", run, n, ky, expv);
          end
        end else begin
          // output holds while en is low
          checks++;
          if (n > 0 && int'(y) !== pend) begin
            failures++;
            if (failures < 10) $display("FAIL run %0d n=%0d output changed without en", run, n);
          end
        end
        pend = int'(y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
