// tb_allpass2: self-checking testbench of the second-order all-pass cell.
// Two cells run side by side: D = 2 with the Wallace tree multiplier and
// D = 1 with the array multiplier. Random samples, sometimes full scale so
// that saturation happens, are applied on random enable cycles, and the
// combinational output is compared with the integer model on every enabled
// cycle. The impulse response of the D = 2 cell is also checked against the
// closed form a, 0, 1 - a^2, 0, -a(1 - a^2), ... (to within truncation).
module tb_allpass2;
  import hbiir_pkg::*;
  import hbiir_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic signed [15:0] coef2, coef1, x;
  logic signed [15:0] y2, y1;

  always #5 clk = ~clk;

  allpass2 #(.D(2), .MULT(MULT_WALLACE)) u_d2 (
    .clk(clk), .rst_n(rst_n), .en(en), .coef(coef2), .x(x), .y(y2));
  allpass2 #(.D(1), .MULT(MULT_ARRAY)) u_d1 (
    .clk(clk), .rst_n(rst_n), .en(en), .coef(coef1), .x(x), .y(y1));

  initial begin
    repeat (20000) @(posedge clk);
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

  initial begin
    ap_model m2, m1;
    int e2, e1;

    // impulse response, coefficient 0.5 (Q1.15 16384)
    coef2 = 16'sd16384;
    coef1 = 16'sd16384;
    do_reset();
    for (int n = 0; n < 8; n++) begin
      int expv;
      x = (n == 0) ? 16'sd16384 : 16'sd0;   // impulse of 0.5
      en = 1'b1;
      #1;
      // h = 0.5, 0, 0.75, 0, -0.375, 0, 0.1875, 0 scaled by 16384
      case (n)
        0: expv = 8192;
        2: expv = 12288;
        4: expv = -6144;
        6: expv = 3072;
        default: expv = 0;
      endcase
      checks++;
      if (int'(y2) > expv + 1 || int'(y2) < expv - 1) begin
        failures++;
        $display("FAIL impulse n=%0d y=%0d expected %0d", n, y2, expv);
      end
      @(posedge clk);
      #1;
    end

    // random run with the coefficients of the published simulation and others
    for (int run = 0; run < 4; run++) begin
      case (run)
        0: begin coef2 = 16'sh1EFF; coef1 = 16'sh3F6A; end
        1: begin coef2 = 16'sh1AC8; coef1 = 16'sh3383; end
        2: begin coef2 = -16'sd20000; coef1 = 16'sd30000; end
        default: begin coef2 = 16'($urandom); coef1 = 16'($urandom); end
      endcase
      do_reset();
      m2 = new(2, int'(coef2));
      m1 = new(1, int'(coef1));
      for (int n = 0; n < 2000; n++) begin
        en = ($urandom % 4) !== 0;
        if ($urandom % 8 == 0) x = ($urandom % 2 == 1) ? 16'sh7FFF : 16'sh8000;
        else if (run == 3)     x = 16'($urandom);
        else                   x = 16'($signed($urandom % 32768) - 16384);
        #1;
        if (en) begin
          e2 = m2.step(int'(x));
          e1 = m1.step(int'(x));
          checks += 2;
          if (int'(y2) !== e2) begin
            failures++;
            if (failures < 10) $display("FAIL D=2 run %0d n=%0d y=%0d expected %0d", run, n, y2, e2);
          end
          if (int'(y1) !== e1) begin
            failures++;
            if (failures < 10) $display("FAIL D=1 run %0d n=%0d y=%0d expected %0d", run, n, y1, e1);
          end
        end
        @(posedge clk);
        #1;
      end
    end
    checks++;
    if (sat_events == 0) begin
      failures++;
      $display("FAIL saturation never exercised");
    end
    $display("saturation events in model: %0d", sat_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
