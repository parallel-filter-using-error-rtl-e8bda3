// tb_ref_pkg -- reference model shared by the testbenches.
//
// Holds the example coefficients written out independently of the RTL package,
// and a FIR reference that keeps its own sample history per channel and
// computes y[n] = sum h[l] x[n-l] with 64-bit integers.
package tb_ref_pkg;

  localparam int REF_TAPS = 8;
  localparam longint REF_H [REF_TAPS] = '{-3, 0, 19, 40, 40, 19, 0, -3};

  // Sample history of one channel: hist[0] = newest sample.
  typedef longint hist_t [REF_TAPS];

  function automatic void hist_clear(ref hist_t h);
    foreach (h[i]) h[i] = 0;
  endfunction

  function automatic longint fir_step(ref hist_t h, input longint x);
    longint acc = 0;
    for (int i = REF_TAPS-1; i > 0; i--) h[i] = h[i-1];
    h[0] = x;
    for (int i = 0; i < REF_TAPS; i++) acc += h[i] * REF_H[i];
    return acc;
  endfunction

  // Random signed value in [lo, hi].
  function automatic longint rand_range(longint lo, longint hi);
    return lo + longint'($urandom_range(0, 32'(hi - lo)));
  endfunction

  // Random nonzero error pattern for a W-bit word (W <= 32).
  function automatic logic [31:0] rand_err(int w);
    logic [31:0] e;
    do e = $urandom & ((32'h1 << w) - 1); while (e == 0);
    return e;
  endfunction

endpackage
