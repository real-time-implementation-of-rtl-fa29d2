// linc_calculator: LINC decomposer that computes the error vector (System #2).
//
// LINC (linear amplification with nonlinear components) writes each sample
// s = x + j y as the sum of two constant-envelope samples, S1 = s(1 + j e)/2
// and S2 = s(1 - j e)/2, with e = sqrt(MAX / |s|^2 - 1), MAX being the
// squared clipping level (vector form of the decomposition). When
// |s|^2 > MAX, or s = 0, e is 0 and both branches carry s/2. This is the
// behaviour of the original calculator block, including the threshold test
// on |s|^2 and its int16 samples, two samples per clock (lane 0 = s[n],
// lane 1 = s[n+1]); branch outputs saturate to int16.
//
// Arithmetic (this design's own; the original used floating point): |s|^2
// exact in 32 bits, e in unsigned Q16.16 computed as
// isqrt(((MAX - |s|^2) << 32) / |s|^2), i.e. floor(2^16 * e); products with
// x and y floored. Results are within one LSB of the exact value.
//
// Interface / timing: fully pipelined, one pair per clock, latency 3
// (|s|^2; divide and square root; branch products). `out_valid` follows
// `in_valid` three cycles later; `clip` flags lanes whose |s|^2 exceeded
// MAX. `max_sq` is sampled with the input. Synchronous active-high reset
// clears the valid pipeline.
module linc_calculator
  import glinc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  iq16_pair_t  in,
  input  logic [31:0] max_sq,
  output logic        out_valid,
  output iq16_pair_t  left,
  output iq16_pair_t  right,
  output logic [1:0]  clip
);

  logic [2:0]  vld;
  iq16_pair_t  s1_x, s2_x;
  logic [31:0] s1_u [2];
  logic [31:0] s1_max;
  logic [31:0] s2_e [2];
  logic [1:0]  s1_clip, s2_clip;

  function automatic logic [31:0] calc_e(input logic [31:0] u, input logic [31:0] mx);
    logic [63:0] ratio;
    if (u == '0 || u > mx) return '0;
    ratio = ({32'd0, mx - u} << 32) / {32'd0, u};
    return isqrt64(ratio);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) vld <= '0;
    else     vld <= {vld[1:0], in_valid};
  end

  // Stage 1: quadratic modulus.
  always_ff @(posedge clk) begin
    for (int l = 0; l < 2; l++) begin
      s1_u[l] <= 32'($signed(in[l].i) * $signed(in[l].i)) +
                 32'($signed(in[l].q) * $signed(in[l].q));
    end
    s1_x   <= in;
    s1_max <= max_sq;
  end

  always_comb
    for (int l = 0; l < 2; l++) s1_clip[l] = (s1_u[l] > s1_max);

  // Stage 2: e = sqrt(MAX/|s|^2 - 1).
  always_ff @(posedge clk) begin
    for (int l = 0; l < 2; l++) s2_e[l] <= calc_e(s1_u[l], s1_max);
    s2_x    <= s1_x;
    s2_clip <= s1_clip;
  end

  // Stage 3: branch samples.
  always_ff @(posedge clk) begin
    for (int l = 0; l < 2; l++) begin
      linc_out_t r;
      r = linc_branches(s2_x[l].i, s2_x[l].q, s2_e[l]);
      left[l]  <= r.s1;
      right[l] <= r.s2;
    end
    clip <= s2_clip;
  end

  assign out_valid = vld[2];

endmodule
