// sync_fifo: single-clock FIFO placed between the blocks of the chain.
//
// In the transmitter every block hands its samples to the next through a
// FIFO, so that differences in rate and latency between blocks are absorbed
// and a block only starts when data is available. The depth of the
// generator-side FIFO (64) follows the original generator's output FIFO;
// the structure (circular buffer, first-word fall-through) is this design's
// own.
//
// Interface / timing: `rd_data` shows the oldest entry whenever `empty` is
// low (fall-through); `rd_en` pops it at the clock edge. `wr_en` pushes
// `wr_data`. Pushing when full or popping when empty is a protocol error
// (checked by assertions) and is ignored. `count` gives the fill level.
// Synchronous active-high reset empties the FIFO.
module sync_fifo #(
  parameter int unsigned W     = 44,
  parameter int unsigned DEPTH = 64
)(
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     wr_en,
  input  logic [W-1:0]             wr_data,
  output logic                     full,
  input  logic                     rd_en,
  output logic [W-1:0]             rd_data,
  output logic                     empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic [CW-1:0] cnt;
  logic          do_wr, do_rd;

  assign full    = (cnt == CW'(DEPTH));
  assign empty   = (cnt == '0);
  assign count   = cnt;
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rptr];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0;
      rptr <= '0;
      cnt  <= '0;
    end else begin
      if (do_wr) wptr <= inc(wptr);
      if (do_rd) rptr <= inc(rptr);
      cnt <= cnt + CW'(do_wr) - CW'(do_rd);
    end
  end

  // Handshake rules.
  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(rd_en && empty));

endmodule
