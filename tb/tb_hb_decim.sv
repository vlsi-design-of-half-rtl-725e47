// tb_hb_decim: self-checking testbench of the polyphase half-band IIR
// decimator. Input samples arrive on random cycles (x_valid). Even-numbered
// samples go through an integer all-pass model of branch 0, odd-numbered ones
// through branch 1; each output must equal the branch-0 result of an even
// sample plus the branch-1 result of the odd sample before it, one cycle
// after the even sample, and there must be one output per two inputs. Two
// tone tests check the half-band property independently of the model: a
// constant input comes out doubled, an input alternating in sign is removed.
module tb_hb_decim;
  import hbiir_pkg::*;
  import hbiir_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic x_valid = 1'b0;
  logic signed [15:0] a0, a1, x;
  logic signed [16:0] y;
  logic y_valid;

  always #5 clk = ~clk;

  hb_decim #(.MULT(MULT_ARRAY)) u_dut (
    .clk(clk), .rst_n(rst_n), .x_valid(x_valid), .a0(a0), .a1(a1), .x(x),
    .y(y), .y_valid(y_valid));

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    rst_n = 1'b0;
    x_valid = 1'b0;
    x = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
  endtask

  // kind 0: random samples; 1: constant amp; 2: alternating +-amp.
  task automatic run(input int kind, input int amp, input int n);
    ap_model m0, m1;
    int y1_hold, n_in, n_out, e;
    bit have_exp;
    do_reset();
    m0 = new(1, int'(a0));
    m1 = new(1, int'(a1));
    y1_hold = 0;
    n_in = 0;
    n_out = 0;
    for (int i = 0; i < n; i++) begin
      x_valid = (kind !== 0) ? 1'b1 : (($urandom % 3) !== 0);
      case (kind)
        1: x = 16'(amp);
        2: x = 16'((n_in % 2 == 0) ? amp : -amp);
        default: x = ($urandom % 8 == 0) ? (($urandom % 2 == 1) ? 16'sh7FFF : 16'sh8000) : 16'($urandom);
      endcase
      have_exp = 1'b0;
      if (x_valid) begin
        if (n_in % 2 == 0) begin
          e = m0.step(int'(x)) + y1_hold;
          have_exp = 1'b1;
        end else begin
          y1_hold = m1.step(int'(x));
        end
        n_in++;
      end
      @(posedge clk);
      #1;
      checks++;
      if (y_valid !== have_exp) begin
        failures++;
        $display("FAIL y_valid=%0b at input %0d", y_valid, n_in);
      end
      if (y_valid) begin
        n_out++;
        checks++;
        if (kind == 0 && int'(y) !== e) begin
          failures++;
          if (failures < 10) $display("FAIL out %0d: y=%0d expected %0d", n_out, y, e);
        end
        if (kind == 1 && n_out > 100 && (int'(y) > 2 * amp + 4 || int'(y) < 2 * amp - 4)) begin
          failures++;
          $display("FAIL DC: y=%0d for constant %0d", y, amp);
        end
        if (kind == 2 && n_out > 100 && (int'(y) > 4 || int'(y) < -4)) begin
          failures++;
          $display("FAIL half-rate tone not removed: y=%0d", y);
        end
      end
    end
    checks++;
    if (n_out !== (n_in + 1) / 2) begin
      failures++;
      $display("FAIL rate: %0d inputs, %0d outputs", n_in, n_out);
    end
  endtask

  initial begin
    a0 = 16'sh1EFF;
    a1 = 16'sh3F6A;
    run(1, 9000, 400);
    run(2, 9000, 400);
    run(0, 0, 4000);
    a0 = 16'sh1AC8;
    a1 = 16'sh3383;
    run(0, 0, 4000);
    a0 = 16'($urandom);
    a1 = 16'($urandom);
    run(0, 0, 4000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
