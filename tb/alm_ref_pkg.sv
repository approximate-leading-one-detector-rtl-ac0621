// alm_ref_pkg: arithmetic reference model of the approximate Mitchell
// multiplier, for the testbenches.
//
// It works with integers instead of one-hot words and shifters: the
// leading-one position is found by scanning, the mantissa is the operand
// modulo 2^k scaled by 2^(31-k), the log sum keeps only the bits above the
// approximated field and adds the alternating pattern, and the
// antilogarithm is (2^31 + m) * 2^k / 2^31, truncated.
package alm_ref_pkg;

  // Index of the most significant 1, or -1 for zero.
  function automatic int lead_pos(input logic [31:0] a);
    for (int i = 31; i >= 0; i--) if (a[i]) return i;
    return -1;
  endfunction

  // Leading-one position as estimated by the approximate detector
  // (variant 1 or 2), or the exact one (variant 0).
  function automatic int est_pos(input logic [31:0] a, input int variant);
    if (a == 0) return -1;
    if (variant == 0 || a >= 32'h0001_0000) return lead_pos(a);
    if (variant == 1) return 10;
    if (a[15:12] != 0) return 14;
    if (a[11:8]  != 0) return 10;
    if (a[7:4]   != 0) return 6;
    return 2;
  endfunction

  // {k, m} for operand a whose leading one is taken to be at bit k.
  function automatic logic [35:0] log_of(input logic [31:0] a, input int k);
    longint unsigned frac;
    frac = (longint'(a) % (64'd1 << k)) * (64'd1 << (31 - k));
    frac = frac % (64'd1 << 31);
    return 36'((longint'(k) << 31) + frac);
  endfunction

  // Sum of two logs with the low 'approx' bits replaced by 1010...
  function automatic logic [36:0] log_add(input logic [35:0] la, lb,
                                          input int approx);
    longint unsigned hi, pat;
    hi  = (longint'(la) >> approx) + (longint'(lb) >> approx);
    pat = 0;
    for (int i = 1; i < approx; i += 2) pat += (64'd1 << i);
    return 37'((hi << approx) + pat);
  endfunction

  function automatic logic [63:0] antilog_of(input logic [36:0] s);
    logic [127:0] v;
    int k;
    k = int'(s >> 31);
    v = (128'(s % (37'd1 << 31)) + (128'd1 << 31)) * (128'd1 << k);
    return 64'(v / (128'd1 << 31));
  endfunction

  // Whole multiplier: variant 0 = exact LOD, 1 = Design I, 2 = Design II.
  function automatic logic [63:0] mult(input logic [31:0] a, b,
                                       input int variant, input int approx);
    if (a == 0 || b == 0) return 64'd0;
    return antilog_of(log_add(log_of(a, est_pos(a, variant)),
                              log_of(b, est_pos(b, variant)), approx));
  endfunction

  // Random operand of random magnitude: 1 .. 32 significant bits.
  function automatic logic [31:0] rand_operand();
    int unsigned bits;
    bits = ($urandom % 32) + 1;
    return $urandom >> (32 - bits);
  endfunction

endpackage
