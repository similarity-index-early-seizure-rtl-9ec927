// sid_ref_pkg: reference model of the similarity-index detector used by the
// testbenches. It is written from the algorithm, not from the RTL: the log
// table is computed with real arithmetic, windows and blocks are handled on
// stored arrays.
package sid_ref_pkg;

  // Scaled log2 with 4 fractional bits: integer part from the leading one,
  // fraction round(16*log2(1+m/16)) from the four bits below it.
  function automatic int ref_log2(input longint unsigned x);
    int p, m;
    real f;
    if (x == 0) return 0;
    p = 0;
    for (int i = 0; i < 63; i++) if (x[i]) p = i;
    if (p >= 4) m = int'((x >> (p - 4)) & 15);
    else        m = int'((x << (4 - p)) & 15);
    f = 16.0 * $ln(1.0 + real'(m) / 16.0) / $ln(2.0);
    return p * 16 + int'($floor(f + 0.5));
  endfunction

  function automatic int sat8(input int v);
    if (v > 127)  return 127;
    if (v < -128) return -128;
    return v;
  endfunction

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  // Floor division by 2**k of a signed integer.
  function automatic int asr(input int v, input int k);
    return int'($floor(real'(v) / real'(2 ** k)));
  endfunction

  // H_e from the window sums.
  function automatic int ref_he(input longint unsigned v, input longint unsigned w);
    return sat8(ref_log2(w) - ref_log2(v));
  endfunction

endpackage
