// hbiir_ref_pkg: reference models for the half-band IIR testbenches.
//
// Sample-level models written with plain integer arithmetic (the * operator,
// no bit-level structure), so that the hardware's array and Wallace
// multipliers, saturation and delay lines are checked against an independent
// calculation. They follow the same fixed-point rules as the hardware:
// Q1.15 coefficients, 16-bit samples, saturation of the all-pass difference
// and output, products truncated by an arithmetic shift of 15 bits.
package hbiir_ref_pkg;

  localparam int SMAX = 32767;
  localparam int SMIN = -32768;

  // Counts how often any model had to saturate (to show overflow was exercised).
  int sat_events = 0;

  function automatic int ref_sat(input longint v);
    if (v > longint'(SMAX)) begin sat_events++; return SMAX; end
    if (v < longint'(SMIN)) begin sat_events++; return SMIN; end
    return int'(v);
  endfunction

  // All-pass cell (a + z^-D) / (1 + a z^-D) on integer samples.
  class ap_model;
    int d;
    int a;
    int xd[$];
    int yd[$];

    function new(int d_, int a_);
      d = d_;
      a = a_;
      xd = {};
      yd = {};
      for (int i = 0; i < d; i++) begin
        xd.push_back(0);
        yd.push_back(0);
      end
    endfunction

    // Output for input x; advances the state.
    function int step(int x);
      int diff, y;
      longint prod;
      diff = ref_sat(longint'(x) - longint'(yd[d-1]));
      prod = longint'(diff) * longint'(a);
      y    = ref_sat((prod >>> 15) + longint'(xd[d-1]));
      void'(xd.pop_back());
      void'(yd.pop_back());
      xd.push_front(x);
      yd.push_front(y);
      return y;
    endfunction
  endclass

  // Sinc^N interpolator by R as a direct FIR on the zero-stuffed input: its
  // impulse response is the N-fold convolution of R ones.
  class sinc_model;
    longint h[$];
    longint u[$];

    function new(int order, int ratio);
      longint t[$];
      h = {1};
      for (int n = 0; n < order; n++) begin
        t = {};
        for (int k = 0; k < h.size() + ratio - 1; k++) t.push_back(0);
        foreach (h[i]) for (int j = 0; j < ratio; j++) t[i+j] += h[i];
        h = t;
      end
      u = {};
      foreach (h[i]) u.push_back(0);
    endfunction

    // One output-rate step; xin is the stuffed input (0 between samples).
    function longint step(longint xin);
      longint acc;
      void'(u.pop_back());
      u.push_front(xin);
      acc = 0;
      foreach (h[i]) acc += h[i] * u[i];
      return acc;
    endfunction
  endclass

endpackage
