// glinc_pkg: types and constants shared by the RMM + LINC transmitter.
//
// Fixed-point formats used along the chain (Qi.f = i integer bits including
// the sign, f fractional bits):
//   RMM coefficients            Q2.18  (20 bit signed)
//   generator output samples    Q4.18  (22 bit signed)  = RRC input
//   RRC taps                    Q0.16  (16 bit signed, all taps are < 0.5)
//   RRC output samples          Q7.9   (16 bit signed), read by LINC as int16
//   LINC branch samples         int16
//   LINC LUT entries            Q6.14  (20 bit unsigned)
// The formats, the RNG constants, the sqrt(8) and 1/sqrt(2) factors and the
// RRC taps are the ones of the original design. The RRC taps are stored as
// round(tap * 2^16) of the 57 unique taps of the 113-tap symmetric RRC
// (roll-off 0.25, L = 8, Nsym = 7); a shorter filter (Nsym = 5, 81 taps) is
// exactly the middle part of the same response.
package glinc_pkg;

  // ---------------------------------------------------------------- widths
  localparam int unsigned GEN_W   = 22;  // Q4.18 generator / RRC input sample
  localparam int unsigned GEN_FR  = 18;
  localparam int unsigned MM_W    = 20;  // Q2.18 RMM coefficient
  localparam int unsigned MM_FR   = 18;
  localparam int unsigned RRC_W   = 16;  // Q7.9 RRC output sample
  localparam int unsigned RRC_FR  = 9;
  localparam int unsigned TAP_W   = 16;  // Q0.16 RRC tap
  localparam int unsigned TAP_FR  = 16;
  localparam int unsigned SMP_W   = 16;  // int16 LINC input/output sample
  localparam int unsigned ELUT_W  = 20;  // Q6.14 LINC LUT entry
  localparam int unsigned ELUT_FR = 14;

  typedef logic signed [GEN_W-1:0]  gen_smp_t;
  typedef logic signed [MM_W-1:0]   mm_coef_t;
  typedef logic signed [RRC_W-1:0]  rrc_smp_t;
  typedef logic signed [SMP_W-1:0]  smp16_t;

  // Complex sample at the generator output (Q4.18 per rail).
  typedef struct packed {
    gen_smp_t i;
    gen_smp_t q;
  } gen_iq_t;

  // Complex int16 sample (RRC output / LINC input and branch samples).
  typedef struct packed {
    smp16_t i;
    smp16_t q;
  } iq16_t;

  // Two adjacent complex samples s[n] (lane 0) and s[n+1] (lane 1), the
  // 64-bit word the DAC path carries per clock.
  typedef iq16_t [1:0] iq16_pair_t;

  // ------------------------------------------------------------ generator
  // Linear congruential generator: seed' = (seed*RNG_M + RNG_S) % RNG_T,
  // symbol = (4*seed) / RNG_T, seed starts at RNG_SEED0.
  localparam int unsigned RNG_T     = 714025;
  localparam int unsigned RNG_M_LOG = 12;          // RNG_M = 4096 = 2^12
  localparam int unsigned RNG_S     = 150889;
  localparam int unsigned RNG_SEED0 = 357;
  localparam int unsigned SEED_W    = 20;          // seed < 714025 < 2^20

  localparam int unsigned D_SYM     = 3;           // RMM half window
  localparam int unsigned RMM_SYMS  = 2*D_SYM + 1; // 7 symbols
  localparam int unsigned RMM_AW    = 2*RMM_SYMS;  // 14-bit table address
  localparam int unsigned UPS_L     = 8;           // upsampling factor

  // 1.0 in Q2.18 (RMM bypassed).
  localparam mm_coef_t MM_ONE       = mm_coef_t'(1 << MM_FR);
  // floor(2^18 / sqrt(2)) and floor(2^18 * sqrt(8)): QPSK amplitude and the
  // power-preserving gain of the x8 upsampler.
  localparam int       INV_SQRT2_Q18 = 185363;
  localparam int       SQRT8_Q18     = 741455;

  // --------------------------------------------------------------- RRC
  localparam int unsigned RRC_NSYM_MAX = 7;
  localparam int unsigned RRC_TAPS_MAX = 2*RRC_NSYM_MAX*UPS_L + 1;  // 113
  localparam int unsigned RRC_HALF     = (RRC_TAPS_MAX + 1) / 2;    // 57

  typedef logic signed [TAP_W-1:0] rrc_tap_t;
  typedef rrc_tap_t rrc_half_t [RRC_HALF];

  // Taps h[0..56] of the 113-tap filter; h[112-k] = h[k].
  localparam rrc_half_t RRC_HALF_TAPS = '{
      124,    57,   -28,  -112,  -176,  -204,  -187,  -127,   -35,    68,
      158,   212,   215,   163,    64,   -58,  -174,  -251,  -265,  -202,
      -68,   112,   297,   439,   492,   425,   230,   -70,  -424,  -758,
     -989, -1043,  -869,  -461,   140,   841,  1513,  2006,  2180,  1934,
     1229,   114, -1274, -2719, -3946, -4663, -4604, -3574, -1488,  1604,
     5511,  9916, 14407, 18532, 21854, 24007, 24753 };

  // Tap k of an RRC with nsym symbols each side (2*nsym*8+1 taps), taken
  // from the centre of the 113-tap response.
  function automatic rrc_tap_t rrc_tap(input int unsigned nsym, input int unsigned k);
    int unsigned off, j;
    off = (RRC_TAPS_MAX - (2*nsym*UPS_L + 1)) / 2;
    j   = k + off;
    if (j >= RRC_HALF) j = RRC_TAPS_MAX - 1 - j;
    return RRC_HALF_TAPS[j];
  endfunction

  // ---------------------------------------------------------------- LINC
  localparam int unsigned ELUT_AW  = 12;   // 4096 entries
  localparam int unsigned ELUT_LSB = 11;   // |s|^2 bits 22..11 address it
  localparam int unsigned ELUT_R2  = 4095; // r_max^2 in address units

  // Integer square root, floor(sqrt(v)), bit by bit.
  function automatic logic [31:0] isqrt64(input logic [63:0] v);
    logic [63:0] rem, root, trial;
    rem  = v;
    root = '0;
    for (int b = 31; b >= 0; b--) begin
      trial = root + (64'd1 << (2*b));
      if (rem >= trial) begin
        rem  = rem - trial;
        root = (root >> 1) + (64'd1 << (2*b));
      end else begin
        root = root >> 1;
      end
    end
    return root[31:0];
  endfunction

  // Content of LINC table entry a: sqrt(4095/a - 1) in Q6.14 rounded to
  // nearest, saturated to the 20-bit range (entry 0 is the all-ones word).
  // The square root is taken with one extra fractional bit, then rounded.
  function automatic logic [ELUT_W-1:0] elut_entry(input int unsigned a);
    logic [63:0] ratio;
    logic [31:0] r;
    if (a == 0) return '1;
    ratio = ((64'(ELUT_R2) - 64'(a)) << (2*(ELUT_FR+1))) / 64'(a);
    r = (isqrt64(ratio) + 32'd1) >> 1;
    if (r > 32'((1 << ELUT_W) - 1)) return '1;
    return r[ELUT_W-1:0];
  endfunction

  // LINC branch pair of one complex sample.
  typedef struct packed {
    iq16_t s1;   // left branch  (s + j e s) / 2
    iq16_t s2;   // right branch (s - j e s) / 2
  } linc_out_t;

  function automatic smp16_t sat16(input logic signed [63:0] v);
    if (v > 64'sd32767)  return 16'sh7fff;
    if (v < -64'sd32768) return 16'sh8000;
    return v[15:0];
  endfunction

  // Vector LINC decomposition of s = x + j y with e in Q16.16:
  //   S1 = (x - e y)/2 + j (y + e x)/2,  S2 = (x + e y)/2 + j (y - e x)/2.
  // e*x and e*y are floored to integers, the halving is an arithmetic shift
  // and results saturate to int16.
  function automatic linc_out_t linc_branches(input smp16_t x, input smp16_t y,
                                              input logic [31:0] e);
    logic signed [63:0] ex, ey;
    linc_out_t r;
    ex = (64'($signed({1'b0, e})) * 64'(x)) >>> 16;
    ey = (64'($signed({1'b0, e})) * 64'(y)) >>> 16;
    r.s1.i = sat16((64'(x) - ey) >>> 1);
    r.s1.q = sat16((64'(y) + ex) >>> 1);
    r.s2.i = sat16((64'(x) + ey) >>> 1);
    r.s2.q = sat16((64'(y) - ex) >>> 1);
    return r;
  endfunction

endpackage
