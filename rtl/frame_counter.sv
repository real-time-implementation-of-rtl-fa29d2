// frame_counter: the Counter that paces the RRC filter from the generator.
//
// The generator finishes a frame of 32 sample pairs at a time and signals
// it with a one-cycle `gen_done`; the filter takes one pair per cycle. After
// a done, the Counter holds `rrc_en` high for exactly BURST = 32 cycles
// (counting 0..31), which is what the original Counter does: it is the
// clock enable of the RRC filter and of the read side of the FIFO in front
// of it.
//
// This design's own addition: a done that arrives while a burst is still
// running is not lost but kept in a small backlog count, and the next burst
// follows the current one without a gap. With the generator streaming one
// pair per clock, dones arrive every 32 cycles and the bursts join into a
// continuous enable.
//
// Timing: `rrc_en` rises in the cycle after `gen_done`; `burst_start` marks
// the first cycle of each burst. Synchronous active-high reset.
module frame_counter #(
  parameter int unsigned BURST = 32,
  parameter int unsigned PEND_W = 3
)(
  input  logic clk,
  input  logic rst,
  input  logic gen_done,
  output logic rrc_en,
  output logic burst_start
);

  localparam int unsigned CW = $clog2(BURST);

  logic [CW-1:0]     cnt;
  logic              active, first;
  logic [PEND_W-1:0] pend;
  logic              avail, take;

  assign avail = (pend != '0) || gen_done;

  always_comb begin
    take = 1'b0;
    if (!active)                        take = avail;
    else if (cnt == CW'(BURST-1))       take = avail;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt    <= '0;
      active <= 1'b0;
      first  <= 1'b0;
      pend   <= '0;
    end else begin
      first <= take;
      if (take) begin
        active <= 1'b1;
        cnt    <= '0;
      end else if (active) begin
        if (cnt == CW'(BURST-1)) active <= 1'b0;
        else                     cnt    <= cnt + CW'(1);
      end
      pend <= pend + PEND_W'(gen_done) - PEND_W'(take);
    end
  end

  assign rrc_en      = active;
  assign burst_start = first;

  a_backlog_no_wrap: assert property (@(posedge clk) disable iff (rst)
                                      !(gen_done && !take && pend == '1));

endmodule
