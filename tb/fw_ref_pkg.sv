// fw_ref_pkg: reference model of the fixed-width multiplier for the
// testbenches, written from the arithmetic rather than from the array.
//
// For signed n-bit x, y with exact product P:
//   LSP  = sum of x[i] y[j] 2^(i+j) over i + j <= n-2 (the dropped part)
//   kept = (P - LSP) / 2^(n-2)          (MSP + IC, in units of 2^(n-2))
//   comp = 2 * sum_{k < (n-1)/2} x[n-2-k] y[k]  (+ middle MIC bit if n-1 odd)
//          + round(E[LSP columns 0..n-3] / 2^(n-2)) + 2
//   out  = (kept + comp) / 4, truncated to n bits
// The direct-truncated product, the baseline, is (P - LSP) / 2^n rounded
// down.
package fw_ref_pkg;

  function automatic longint lsp_value(int n, longint x, longint y);
    longint s = 0;
    for (int i = 0; i <= n - 2; i++)
      for (int j = 0; i + j <= n - 2; j++)
        if (x[i] && y[j]) s += longint'(1) << (i + j);
    return s;
  endfunction

  function automatic int bias_units(int n);
    real e;
    // expected value of columns 0..n-3, each bit 1 with probability 1/4
    e = 0.0;
    for (int c = 0; c <= n - 3; c++) e += (c + 1) * (2.0 ** c) / 4.0;
    e = e / (2.0 ** (n - 2));
    return $rtoi(e + 0.5) + 2;
  endfunction

  // Compensated fixed-width product as a signed value (not yet wrapped to n bits).
  function automatic longint fw_value(int n, longint xs, longint ys);
    longint p, kept, comp;
    int m, nup;
    p    = xs * ys;
    kept = (p - lsp_value(n, xs, ys)) >>> (n - 2);
    m    = n - 1;
    nup  = m / 2;
    comp = longint'(bias_units(n));
    for (int k = 0; k < nup; k++)
      if (xs[n-2-k] && ys[k]) comp += 2;
    if (m % 2 == 1 && xs[n-2-nup] && ys[nup]) comp += 1;
    return (kept + comp) >>> 2;
  endfunction

  function automatic longint trunc_value(int n, longint xs, longint ys);
    return (xs * ys - lsp_value(n, xs, ys)) >>> n;
  endfunction

endpackage
