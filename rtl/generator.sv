// generator: OQPSK source with ring-type magnitude modulation and x8
// upsampling (the "Generator" of the transmitter).
//
// Chain: lcg_rng draws a 2-bit symbol (bit 0 = I, bit 1 = Q). The symbol is
// shifted into a 14-bit register (7 symbols, newest in bits 1:0, register
// cleared at reset), the register addresses the two RMM tables (rmm_lut),
// and the factors are applied to the middle symbol of the window (bits 6 =
// I and 7 = Q, i.e. the symbol entered three symbols earlier: the RMM delay
// of D = 3 symbols) by rmm_scaler together with the QPSK mapping and the
// sqrt(8) gain. oqpsk_upsampler turns each symbol into 8 Q4.18 samples per
// rail with the quadrature rail offset by 4 samples. `mm_on` bypasses the
// tables (factor 1.0). All of this follows the original design.
//
// Frames: as in the original, where one call produced 4 symbols = 32 sample
// pairs, the samples are counted in frames of 32 and `frame_done` pulses for
// one cycle in the cycle after the 32nd sample of a frame left. Unlike the
// original, which worked in calls, this block streams: while `run` is high
// it produces one sample pair per clock, stalling when `out_ready` is low.
//
// State continuity: `seed` and `sreg` show the RNG seed and the symbol
// register; a `load` pulse writes `seed_in`/`sreg_in` into them so a stopped
// sequence can be resumed.
//
// Timing: symbol pipeline of 2 cycles (RNG/shift/table read, then scaling),
// overlapped with the 8-cycle upsampling, so after the first sample (3
// cycles after `run` rises) output is continuous. Table loading through
// `lut_we/lut_waddr/lut_wi/lut_wq`. Synchronous active-high reset.
module generator
  import glinc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              run,
  input  logic              mm_on,
  // output stream (to the sample FIFO)
  output logic              out_valid,
  input  logic              out_ready,
  output gen_iq_t           out,
  output logic              frame_done,
  output logic [$clog2(UPS_L)-1:0] out_phase,  // position in the 8-sample group
  // state continuity
  input  logic              load,
  input  logic [SEED_W-1:0] seed_in,
  input  logic [RMM_AW-1:0] sreg_in,
  output logic [SEED_W-1:0] seed,
  output logic [RMM_AW-1:0] sreg,
  // RMM table load port
  input  logic              lut_we,
  input  logic [RMM_AW-1:0] lut_waddr,
  input  mm_coef_t          lut_wi,
  input  mm_coef_t          lut_wq
);

  localparam int unsigned FRAME = 4 * UPS_L;   // 32 sample pairs per frame

  logic [1:0]        rng_sym;
  logic [RMM_AW-1:0] sreg_q, sreg_nxt;
  logic              pend;          // scaled symbol waiting for the upsampler
  logic              issue;         // draw the next symbol this cycle
  logic              sym_ready;
  mm_coef_t          coef_i, coef_q;
  gen_smp_t          amp_i, amp_q;
  logic [$clog2(FRAME)-1:0] smp_cnt;

  assign issue    = run && !load && (!pend || sym_ready);
  assign sreg_nxt = {sreg_q[RMM_AW-3:0], rng_sym};

  lcg_rng u_rng (
    .clk, .rst,
    .step(issue), .load, .seed_in,
    .seed, .sym(rng_sym)
  );

  rmm_lut u_lut (
    .clk,
    .rd_en(issue), .rd_addr(sreg_nxt),
    .coef_i, .coef_q,
    .wr_en(lut_we), .wr_addr(lut_waddr), .wr_coef_i(lut_wi), .wr_coef_q(lut_wq)
  );

  rmm_scaler u_scale (
    .mm_on, .coef_i, .coef_q,
    .bit_i(sreg_q[2*D_SYM]), .bit_q(sreg_q[2*D_SYM+1]),
    .amp_i, .amp_q
  );

  oqpsk_upsampler u_ups (
    .clk, .rst,
    .sym_valid(pend), .sym_ready,
    .amp_i, .amp_q,
    .out_valid, .out_ready, .out, .out_phase
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      sreg_q <= '0;
      pend   <= 1'b0;
    end else begin
      if (load)            sreg_q <= sreg_in;
      else if (issue)      sreg_q <= sreg_nxt;
      if (issue)           pend   <= 1'b1;
      else if (sym_ready)  pend   <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      smp_cnt    <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (out_valid && out_ready) begin
        smp_cnt <= smp_cnt + 1'b1;
        if (smp_cnt == $bits(smp_cnt)'(FRAME-1)) frame_done <= 1'b1;
      end
    end
  end

  assign sreg = sreg_q;

endmodule
