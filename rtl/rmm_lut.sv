// rmm_lut: ring-type magnitude modulation coefficient tables.
//
// Two tables of 2^14 = 16384 entries, one for the in-phase and one for the
// quadrature factor, each entry a signed Q2.18 number. They are addressed by
// the 14-bit symbol shift register of the generator (7 symbols of 2 bits,
// newest symbol in the least-significant bits); the entry gives the factor
// applied to the middle symbol of that window. Table size and format follow
// the original design.
//
// The table contents are computed offline by the iterative RMM algorithm
// (filter, limit the magnitude to [A_l, A_u] = [0.8, 1.1], matched filter,
// resample, repeat until nothing is limited, take the ratio to the original
// symbols). They are not part of this RTL: the tables are RAMs with a write
// port so a host can load them. After reset release they hold 1.0 in every
// entry (set by the initial block below), i.e. the identity until loaded.
//
// Timing: synchronous read, `coef_i/coef_q` valid one cycle after `rd_en`
// with `rd_addr` (BRAM style). The write port writes both tables at `wr_addr`
// when `wr_en` is high. A write and read to the same address in one cycle
// return the old value.
module rmm_lut
  import glinc_pkg::*;
#(
  parameter int unsigned AW = RMM_AW   // 14 -> 16384 entries
)(
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output mm_coef_t      coef_i,
  output mm_coef_t      coef_q,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  mm_coef_t      wr_coef_i,
  input  mm_coef_t      wr_coef_q
);

  localparam int unsigned DEPTH = 1 << AW;

  mm_coef_t tab_i [DEPTH];
  mm_coef_t tab_q [DEPTH];

  initial begin
    for (int a = 0; a < int'(DEPTH); a++) begin
      tab_i[a] = MM_ONE;
      tab_q[a] = MM_ONE;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      tab_i[wr_addr] <= wr_coef_i;
      tab_q[wr_addr] <= wr_coef_q;
    end
    if (rd_en) begin
      coef_i <= tab_i[rd_addr];
      coef_q <= tab_q[rd_addr];
    end
  end

endmodule
