// tb_sinc_interp: self-checking testbench of the sinc^N interpolator, in the
// two forms of the interpolation chain: third order by 2 and second order by
// 8. The output-rate enable is random. The model is a direct FIR whose taps
// are the N-fold convolution of RATIO ones, applied to the zero-stuffed input;
// it shares nothing with the integrator-comb structure. Checked: every output,
// that an input is taken on every RATIO-th ce only, and the DC gain
// RATIO^(ORDER-1) for a constant full-scale input (which makes the
// accumulators wrap around).
module tb_sinc_interp;
  import hbiir_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic ce = 1'b0;
  logic signed [15:0] x;
  logic take3, take2, v3, v2;
  logic signed [17:0] y3;   // 16 + (3-1)*1
  logic signed [18:0] y2;   // 16 + (2-1)*3

  always #5 clk = ~clk;

  sinc_interp #(.IN_W(16), .ORDER(3), .RATIO(2)) u_s3 (
    .clk(clk), .rst_n(rst_n), .ce(ce), .x(x), .x_take(take3), .y(y3), .y_valid(v3));
  sinc_interp #(.IN_W(16), .ORDER(2), .RATIO(8)) u_s2 (
    .clk(clk), .rst_n(rst_n), .ce(ce), .x(x), .x_take(take2), .y(y2), .y_valid(v2));

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // kind 0: random input, random ce; 1: constant dc, ce every cycle.
  task automatic run(input int kind, input int dc, input int n);
    sinc_model m3, m2;
    longint e3, e2;
    int n_ce;
    rst_n = 1'b0;
    ce = 1'b0;
    x = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    m3 = new(3, 2);
    m2 = new(2, 8);
    n_ce = 0;
    for (int i = 0; i < n; i++) begin
      ce = (kind == 1) ? 1'b1 : (($urandom % 2) == 0);
      x = (kind == 1) ? 16'(dc) : 16'($urandom);
      #1;
      if (ce) begin
        checks += 2;
        if (take3 !== (n_ce % 2 == 0) || take2 !== (n_ce % 8 == 0)) begin
          failures++;
          $display("FAIL x_take on ce %0d: %0b %0b", n_ce, take3, take2);
        end
        e3 = m3.step(take3 ? longint'(x) : 0);
        e2 = m2.step(take2 ? longint'(x) : 0);
        n_ce++;
      end
      @(posedge clk);
      #1;
      checks++;
      if (v3 !== ce || v2 !== ce) begin
        failures++;
        $display("FAIL y_valid");
      end
      if (ce) begin
        if (longint'(y3) !== e3) begin
          failures++;
          if (failures < 10) $display("FAIL sinc3 ce %0d: y=%0d expected %0d", n_ce, y3, e3);
        end
        if (longint'(y2) !== e2) begin
          failures++;
          if (failures < 10) $display("FAIL sinc2 ce %0d: y=%0d expected %0d", n_ce, y2, e2);
        end
        if (kind == 1 && n_ce > 40) begin
          checks += 2;
          if (int'(y3) !== 4 * dc || int'(y2) !== 8 * dc) begin
            failures++;
            $display("FAIL DC gain: %0d %0d for %0d", y3, y2, dc);
          end
        end
      end
    end
  endtask

  initial begin
    run(1, 32767, 300);
    run(1, -32768, 300);
    run(0, 0, 5000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
