// linc_lut: LINC decomposer with the error vector read from a table
// (System #1).
//
// Same decomposition as linc_calculator, S1 = s(1 + j e)/2 and
// S2 = s(1 - j e)/2, but e = sqrt(r_max^2/|s|^2 - 1) is not computed: bits
// 22..11 of the 32-bit |s|^2 address a 4096-entry table of unsigned Q6.14
// values; bits 31..23 and 10..0 are dropped. Entry a holds
// sqrt(4095/a - 1), i.e. r_max^2 = 4095 table steps = 4095 * 2^11 in
// |s|^2 units (r_max about 2896 in int16 units). Entry 0 is the largest
// value (all ones) and entry 4095 is 0. Address slicing, table size and
// entry format follow the original design; entries are rounded to nearest.
// The table is filled at start-up from that formula (an initial loop over
// glinc_pkg::elut_entry), so it is a ROM.
//
// Interface / timing: two samples per clock (lane 0 = s[n], lane 1 =
// s[n+1]), fully pipelined with latency 3 (|s|^2; table read; branch
// products). Branch outputs saturate to int16. Synchronous active-high
// reset clears the valid pipeline.
module linc_lut
  import glinc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  iq16_pair_t in,
  output logic       out_valid,
  output iq16_pair_t left,
  output iq16_pair_t right
);

  localparam int unsigned DEPTH = 1 << ELUT_AW;

  logic [ELUT_W-1:0] rom [DEPTH];

  initial begin
    for (int a = 0; a < int'(DEPTH); a++) rom[a] = elut_entry(a);
  end

  logic [2:0]         vld;
  iq16_pair_t         s1_x, s2_x;
  logic [ELUT_AW-1:0] s1_a [2];
  logic [ELUT_W-1:0]  s2_e [2];

  always_ff @(posedge clk) begin
    if (rst) vld <= '0;
    else     vld <= {vld[1:0], in_valid};
  end

  // Stage 1: quadratic modulus and table address.
  always_ff @(posedge clk) begin
    for (int l = 0; l < 2; l++) begin
      logic [31:0] u;
      u = 32'($signed(in[l].i) * $signed(in[l].i)) +
          32'($signed(in[l].q) * $signed(in[l].q));
      s1_a[l] <= u[ELUT_LSB +: ELUT_AW];
    end
    s1_x <= in;
  end

  // Stage 2: table read.
  always_ff @(posedge clk) begin
    for (int l = 0; l < 2; l++) s2_e[l] <= rom[s1_a[l]];
    s2_x <= s1_x;
  end

  // Stage 3: branch samples (e converted from Q6.14 to Q16.16).
  always_ff @(posedge clk) begin
    for (int l = 0; l < 2; l++) begin
      linc_out_t r;
      r = linc_branches(s2_x[l].i, s2_x[l].q, {10'd0, s2_e[l], 2'b00});
      left[l]  <= r.s1;
      right[l] <= r.s2;
    end
  end

  assign out_valid = vld[2];

endmodule
