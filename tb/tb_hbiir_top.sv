// tb_hbiir_top: end-to-end testbench of the whole design at its default
// parameters (Wallace tree multipliers, sinc^3 x2 and sinc^2 x8 stages).
//
// Interpolation chain: random samples (some full scale, to drive the all-pass
// cells into saturation) are offered at x and held until x_take. A
// sample-level model of the chain (integer all-pass models for the two
// half-band stages, direct FIR sinc models) turns the taken samples into the
// expected 64 fs output stream. The chain's output stream must equal it at one
// fixed latency, found by search and required to be the only one that fits.
// x_take must come every 64 clocks (fs = clock / 64). A constant input must
// come out with the chain's DC gain of 32.
//
// Beside the chain, the single-rate half-band filter and the decimator are fed
// their own random streams and compared with integer models.
//
// Mechanisms counted: inputs taken, interpolated outputs, commutator
// half-band outputs, all-pass saturation (in the model, with matching
// hardware output), filter outputs, decimator outputs. A mechanism that never
// happens counts as a failure.
module tb_hbiir_top;
  import hbiir_pkg::*;
  import hbiir_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  hb_coef_t hb1_coef, hb2_coef, flt_coef, dec_coef;
  logic signed [15:0] x, flt_x, dec_x;
  logic x_take, y_valid, flt_en, dec_x_valid, dec_y_valid;
  logic signed [20:0] y;
  logic signed [16:0] flt_y, dec_y;

  always #5 clk = ~clk;

  hbiir_top u_dut (
    .clk(clk), .rst_n(rst_n),
    .hb1_coef(hb1_coef), .hb2_coef(hb2_coef), .x(x), .x_take(x_take),
    .y(y), .y_valid(y_valid),
    .flt_coef(flt_coef), .flt_en(flt_en), .flt_x(flt_x), .flt_y(flt_y),
    .dec_coef(dec_coef), .dec_x_valid(dec_x_valid), .dec_x(dec_x),
    .dec_y(dec_y), .dec_y_valid(dec_y_valid));

  localparam int N_IN = 160;          // chain input samples per run
  localparam int N_CYC = N_IN * 64;

  initial begin
    repeat (4 * N_CYC + 10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_take = 0, n_out = 0, n_hb_out = 0, n_flt = 0, n_dec = 0;

  // Chain run: dc >= 0 -> constant input; otherwise random.
  task automatic chain_run(input int dc);
    ap_model h1a, h1b, h2a, h2b;
    sinc_model s3, s2;
    int taken[$];
    longint expv[$];
    longint got[$];
    int hb1o[$], hb2o[$];
    int last_take, lat, nmatch;
    bit ok;

    rst_n = 1'b0;
    x = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    last_take = -1;
    x = (dc >= 0) ? 16'(dc) : 16'($urandom);
    for (int c = 0; c < N_CYC; c++) begin
      if (x_take) begin
        taken.push_back(int'(x));
        n_take++;
        if (last_take >= 0) begin
          checks++;
          if (c - last_take !== 64) begin
            failures++;
            $display("FAIL x_take spacing %0d", c - last_take);
          end
        end
        last_take = c;
      end
      @(posedge clk);
      #1;
      if (y_valid) got.push_back(longint'(y));
      if (taken.size() > 0 && last_take == c) begin
        if (dc >= 0) x = 16'(dc);
        else if ($urandom % 6 == 0) x = ($urandom % 2 == 1) ? 16'sh7FFF : 16'sh8000;
        else x = 16'($urandom);
      end
    end

    // model of the chain
    h1a = new(1, int'(hb1_coef.a0));
    h1b = new(1, int'(hb1_coef.a1));
    h2a = new(1, int'(hb2_coef.a0));
    h2b = new(1, int'(hb2_coef.a1));
    s3 = new(3, 2);
    s2 = new(2, 8);
    foreach (taken[i]) begin
      hb1o.push_back(h1a.step(taken[i]));
      hb1o.push_back(h1b.step(taken[i]));
    end
    foreach (hb1o[i]) begin
      hb2o.push_back(h2a.step(hb1o[i]));
      hb2o.push_back(h2b.step(hb1o[i]));
    end
    n_hb_out += hb1o.size() + hb2o.size();
    foreach (hb2o[i]) begin
      for (int r = 0; r < 2; r++) begin
        longint v3 = s3.step(r == 0 ? longint'(hb2o[i]) : 0);
        for (int q = 0; q < 8; q++) expv.push_back(s2.step(q == 0 ? v3 : 0));
      end
    end

    // find the latency at which the hardware stream equals the model stream
    lat = -1;
    nmatch = 0;
    for (int l = 0; l < 400; l++) begin
      ok = 1'b1;
      for (int i = 0; i + l < got.size() && i < expv.size(); i++)
        if (got[i+l] !== expv[i]) begin ok = 1'b0; break; end
      if (ok) begin
        nmatch++;
        if (lat < 0) lat = l;
      end
    end
    checks++;
    if (nmatch !== 1) begin
      failures++;
      $display("FAIL chain output matches the model at %0d latencies", nmatch);
    end else begin
      $display("chain latency %0d clocks, %0d outputs compared", lat, got.size() - lat);
      n_out += got.size() - lat;
      checks += got.size() - lat;
    end
    if (dc >= 0) begin
      checks++;
      if (got[got.size()-1] !== 32 * longint'(dc)) begin
        failures++;
        $display("FAIL chain DC gain: %0d for %0d", got[got.size()-1], dc);
      end
    end
  endtask

  // Single-rate filter and decimator, side by side.
  task automatic side_run(input int n);
    ap_model f0, f1, d0, d1;
    int f1_d, fexp, d1_hold, dexp, dn;
    bit dexp_v;
    rst_n = 1'b0;
    flt_en = 1'b0;
    dec_x_valid = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    f0 = new(2, int'(flt_coef.a0));
    f1 = new(2, int'(flt_coef.a1));
    d0 = new(1, int'(dec_coef.a0));
    d1 = new(1, int'(dec_coef.a1));
    f1_d = 0;
    d1_hold = 0;
    dn = 0;
    for (int i = 0; i < n; i++) begin
      flt_en = ($urandom % 2) == 1;
      flt_x = ($urandom % 6 == 0) ? 16'sh8000 : 16'($urandom);
      dec_x_valid = ($urandom % 2) == 1;
      dec_x = ($urandom % 6 == 0) ? 16'sh7FFF : 16'($urandom);
      dexp_v = 1'b0;
      if (flt_en) begin
        fexp = f0.step(int'(flt_x)) + f1_d;
        f1_d = f1.step(int'(flt_x));
      end
      if (dec_x_valid) begin
        if (dn % 2 == 0) begin dexp = d0.step(int'(dec_x)) + d1_hold; dexp_v = 1'b1; end
        else d1_hold = d1.step(int'(dec_x));
        dn++;
      end
      @(posedge clk);
      #1;
      if (flt_en) begin
        n_flt++;
        checks++;
        if (int'(flt_y) !== fexp) begin
          failures++;
          if (failures < 10) $display("FAIL filter: %0d expected %0d", flt_y, fexp);
        end
      end
      checks++;
      if (dec_y_valid !== dexp_v) begin
        failures++;
        $display("FAIL decimator y_valid");
      end else if (dexp_v) begin
        n_dec++;
        if (int'(dec_y) !== dexp) begin
          failures++;
          if (failures < 10) $display("FAIL decimator: %0d expected %0d", dec_y, dexp);
        end
      end
    end
  endtask

  initial begin
    hb1_coef = '{a0: 16'sh1EFF, a1: 16'sh3F6A};
    hb2_coef = '{a0: 16'sh1AC8, a1: 16'sh3383};
    flt_coef = '{a0: 16'sh1EFF, a1: 16'sh3F6A};
    dec_coef = '{a0: 16'sh1AC8, a1: 16'sh3383};
    flt_en = 1'b0;
    flt_x = '0;
    dec_x_valid = 1'b0;
    dec_x = '0;
    x = '0;

    chain_run(1000);
    chain_run(-1);
    hb1_coef = '{a0: 16'($urandom), a1: 16'($urandom)};
    chain_run(-1);
    side_run(4000);

    $display("mechanisms: inputs taken %0d, chain outputs %0d, half-band commutator outputs %0d, saturations %0d, filter outputs %0d, decimator outputs %0d",
             n_take, n_out, n_hb_out, sat_events, n_flt, n_dec);
    checks += 6;
    if (n_take == 0)     begin failures++; $display("FAIL no input taken"); end
    if (n_out == 0)      begin failures++; $display("FAIL no chain output"); end
    if (n_hb_out == 0)   begin failures++; $display("FAIL no half-band output"); end
    if (sat_events == 0) begin failures++; $display("FAIL no saturation"); end
    if (n_flt == 0)      begin failures++; $display("FAIL no filter output"); end
    if (n_dec == 0)      begin failures++; $display("FAIL no decimator output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
