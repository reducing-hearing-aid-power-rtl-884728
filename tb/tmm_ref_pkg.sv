// tmm_ref_pkg -- arithmetic reference models for the testbenches.
//
// The models work on integers, not on the partial-product matrix: a truncated product
// is the exact product minus the value of the bits that are not formed, plus the
// correction constant and the shift rounding one, taken modulo 2^(2n) and read from
// column n upward; the rounding one in the correction constant is moved up by the
// coefficient shift s. The correction constant is computed with real arithmetic straight
// from its defining formula, and the coefficient shift from the range of the shifted
// value, so no code is shared with the design.
package tmm_ref_pkg;

  // Correction constant for r unformed and k further truncated columns.
  function automatic longint ref_corr(input int r, input int k);
    real e, c;
    e = 0.0;
    for (int q = 0; q < r; q++) e += (q + 1) * (2.0 ** q) / 4.0;
    c = ((2.0 ** (r + k - 1)) - (2.0 ** (r - 1)) + e) / (2.0 ** r);
    return longint'($floor(c + 0.5)) * (longint'(1) << r);
  endfunction

  // Truncated-matrix product of n-bit signed a and b with r unformed columns and a
  // rounding one for a later right shift by s.
  function automatic longint ref_tmm(input longint a, input longint b, input int s,
                                     input int n, input int r);
    longint full, missing, t, mask, pbits;
    full = a * b;
    missing = 0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        if (i + j < r && a[i] && b[j]) missing += longint'(1) << (i + j);
    // The rounding one of the correction constant (column n-1) moves to column n-1+s.
    t = full - missing + ref_corr(r, n - r) - (longint'(1) << (n - 1))
      + (longint'(1) << (n - 1 + s));
    mask  = (longint'(1) << (2 * n)) - 1;
    t     = t & mask;
    pbits = t >> n;                       // n bits, two's complement
    if (pbits[n-1]) pbits -= longint'(1) << n;
    return pbits;
  endfunction

  // Largest left shift that keeps h inside the 16-bit signed range; 15 for zero.
  function automatic int ref_shift(input longint h);
    int s;
    if (h == 0) return 15;
    s = 0;
    while (s < 15 && (h * (longint'(1) << (s + 1))) <= 32767 &&
                     (h * (longint'(1) << (s + 1))) >= -32768)
      s++;
    return s;
  endfunction

  // One FIR tap as the design computes it: truncated product of the sample with the
  // shifted coefficient, then an arithmetic right shift by the coefficient shift.
  function automatic longint ref_tap(input longint x, input longint h, input int r);
    int s;
    longint p;
    s = ref_shift(h);
    p = ref_tmm(x, h * (longint'(1) << s), s, 16, r);
    return p >>> s;
  endfunction

endpackage
