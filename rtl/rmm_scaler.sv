// rmm_scaler: QPSK mapping and magnitude modulation of one symbol.
//
// For the middle symbol of the RMM window it forms the complex amplitude that
// the upsampler sends as an impulse:
//   out_i = ((m_i * 1/sqrt2) * sign_i) * sqrt(8)
//   out_q = ((m_q * 1/sqrt2) * sign_q) * sqrt(8)
// where a symbol bit 1 maps to -1/sqrt2 and a bit 0 to +1/sqrt2 (unit-power
// QPSK), m_i/m_q are the RMM factors (forced to 1.0 when `mm_on` is low) and
// sqrt(8) keeps the average power after the x8 zero-insertion upsampler.
// Mapping, order of the operations and formats are the original design's:
// m and the first product are Q2.18, the constants floor(2^18/sqrt2) and
// floor(2^18*sqrt8) are Q2.18/Q3.18, and the result is Q4.18. Each product
// is truncated (floor) and wraps on overflow, as fixed-point types without
// saturation do.
//
// Purely combinational; no clock.
module rmm_scaler
  import glinc_pkg::*;
(
  input  logic     mm_on,
  input  mm_coef_t coef_i,
  input  mm_coef_t coef_q,
  input  logic     bit_i,
  input  logic     bit_q,
  output gen_smp_t amp_i,
  output gen_smp_t amp_q
);

  function automatic gen_smp_t scale(input mm_coef_t m, input logic neg);
    logic signed [MM_W+20-1:0] p1w;
    logic signed [MM_W-1:0]    p1;
    logic signed [MM_W+22-1:0] p2w;
    p1w = (MM_W+20)'(m) * (MM_W+20)'(INV_SQRT2_Q18);
    p1  = MM_W'(p1w >>> MM_FR);
    if (neg) p1 = -p1;
    p2w = (MM_W+22)'(p1) * (MM_W+22)'(SQRT8_Q18);
    return GEN_W'(p2w >>> MM_FR);
  endfunction

  mm_coef_t m_i, m_q;
  always_comb begin
    m_i   = mm_on ? coef_i : MM_ONE;
    m_q   = mm_on ? coef_q : MM_ONE;
    amp_i = scale(m_i, bit_i);
    amp_q = scale(m_q, bit_q);
  end

endmodule
