// lcg_rng: uniform 2-bit symbol source for the OQPSK generator.
//
// A multiply-and-sum (linear congruential) generator as in the original
// design: seed' = (seed * 4096 + 150889) mod 714025, starting from seed 357,
// and the symbol drawn from the current seed is floor(4 * seed / 714025),
// a value 0..3 (bit 0 = in-phase bit, bit 1 = quadrature bit).
//
// Implementation (this design's own): the multiplication by 4096 = 2^12 and
// the modulo are done together as twelve "double and subtract T if >= T"
// steps, followed by one conditional subtraction after adding 150889, so no
// multiplier or divider is needed. The symbol is found with three
// comparisons of 4*seed against T, 2T and 3T.
//
// Interface / timing: `sym` and `seed` reflect the current seed
// combinationally. A one-cycle `step` pulse advances the seed at the next
// rising clock edge. `load` (priority over `step`) writes `seed_in`, which
// must be below 714025; it serves the state-continuity ports of the
// generator. Synchronous active-high reset returns to seed 357.
module lcg_rng
  import glinc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              step,
  input  logic              load,
  input  logic [SEED_W-1:0] seed_in,
  output logic [SEED_W-1:0] seed,
  output logic [1:0]        sym
);

  logic [SEED_W-1:0] seed_q, seed_nxt;

  // (s * 2^12 + RNG_S) mod RNG_T for s < RNG_T.
  function automatic logic [SEED_W-1:0] lcg_next(input logic [SEED_W-1:0] s);
    logic [SEED_W:0] r;
    r = {1'b0, s};
    for (int k = 0; k < int'(RNG_M_LOG); k++) begin
      r = r << 1;
      if (r >= (SEED_W+1)'(RNG_T)) r = r - (SEED_W+1)'(RNG_T);
    end
    r = r + (SEED_W+1)'(RNG_S);
    if (r >= (SEED_W+1)'(RNG_T)) r = r - (SEED_W+1)'(RNG_T);
    return r[SEED_W-1:0];
  endfunction

  always_comb seed_nxt = lcg_next(seed_q);

  always_ff @(posedge clk) begin
    if (rst)       seed_q <= SEED_W'(RNG_SEED0);
    else if (load) seed_q <= seed_in;
    else if (step) seed_q <= seed_nxt;
  end

  // floor(4*seed / T) by comparison.
  logic [SEED_W+1:0] seed_x4;
  always_comb begin
    seed_x4 = {seed_q, 2'b00};
    if      (seed_x4 >= (SEED_W+2)'(3*RNG_T)) sym = 2'd3;
    else if (seed_x4 >= (SEED_W+2)'(2*RNG_T)) sym = 2'd2;
    else if (seed_x4 >= (SEED_W+2)'(RNG_T))   sym = 2'd1;
    else                                      sym = 2'd0;
  end

  assign seed = seed_q;

endmodule
