// tb_ref_pkg: reference models for the testbenches, written independently
// of the RTL: plain integer / real arithmetic straight from the defining
// equations of each block.
package tb_ref_pkg;

  // RNG: seed' = (seed*4096 + 150889) mod 714025, symbol = 4*seed/714025.
  function automatic longint lcg_next(input longint s);
    return (s * 4096 + 150889) % 714025;
  endfunction
  function automatic int lcg_sym(input longint s);
    return int'((4 * s) / 714025);
  endfunction

  // Generator impulse amplitude in Q4.18 units for factor m (Q2.18 units)
  // and symbol bit b: (+/-) m * (1/sqrt2) * sqrt8 = (+/-) 2 m.
  function automatic real gen_amp(input int m, input bit b);
    real v;
    v = real'(m) / 262144.0 * 0.70710678118 * 2.82842712475 * 262144.0;
    return b ? -v : v;
  endfunction

  // RRC taps of the 113-tap filter (roll-off 0.25, L = 8, 7 symbols each
  // side), first half; the filter is symmetric.
  const real RRC_HALF [57] = '{
     0.0018947,  0.0008729, -0.0004197, -0.0017034, -0.0026812, -0.0031078,
    -0.0028518, -0.0019343, -0.0005359,  0.0010359,  0.0024109,  0.0032410,
     0.0032869,  0.0024862,  0.0009840, -0.0008833, -0.0026526, -0.0038362,
    -0.0040413, -0.0030788, -0.0010370,  0.0017042,  0.0045266,  0.0066916,
     0.0075026,  0.0064799,  0.0035101, -0.0010681, -0.0064688, -0.0115661,
    -0.0150943, -0.0159092, -0.0132629, -0.0070360,  0.0021290,  0.0128334,
     0.0230857,  0.0306119,  0.0332705,  0.0295055,  0.0187566,  0.0017434,
    -0.0194438, -0.0414858, -0.0602093, -0.0711544, -0.0702572, -0.0545421,
    -0.0227113,  0.0244740,  0.0840969,  0.1513058,  0.2198386,  0.2827816,
     0.3334593,  0.3663228,  0.3777046 };

  // Integer Q0.16 tap k of a filter with nsym symbols per side.
  function automatic longint rrc_tap_q16(input int nsym, input int k);
    int n, j;
    n = 2*nsym*8 + 1;
    j = k + (113 - n) / 2;
    if (j > 56) j = 112 - j;
    return longint'($rtoi(RRC_HALF[j] * 65536.0 + (RRC_HALF[j] >= 0 ? 0.5 : -0.5)));
  endfunction

  // Q7.9 output from a full-precision Q4.18 x Q0.16 sum: drop 25 bits,
  // keep 16 (two's complement wrap).
  function automatic shortint rrc_out(input longint acc);
    longint t;
    t = acc >>> 25;
    return shortint'(t[15:0]);
  endfunction

  function automatic int sat16(input real v);
    if (v > 32767.0)  return 32767;
    if (v < -32768.0) return -32768;
    return int'($floor(v));
  endfunction

  // LINC branch values (unrounded) for sample x + j y and error vector e.
  function automatic void linc_ref(input int x, input int y, input real e,
                                   output real s1i, output real s1q,
                                   output real s2i, output real s2q);
    s1i = (x - e*y) / 2.0;
    s1q = (y + e*x) / 2.0;
    s2i = (x + e*y) / 2.0;
    s2q = (y - e*x) / 2.0;
  endfunction

  // |expected - got| <= tol after saturation of the expectation.
  function automatic bit near(input real expv, input int got, input int tol);
    int e;
    e = sat16(expv);
    return (got - e <= tol) && (e - got <= tol);
  endfunction

endpackage
