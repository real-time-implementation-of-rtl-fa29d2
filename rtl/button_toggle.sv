// button_toggle: push button to toggled state bit.
//
// The button input is brought into the clock domain by two flip-flops, then
// debounced: its level is accepted only after it stayed the same for
// DEBOUNCE clock cycles. Each accepted press (low-to-high change of the
// debounced level) inverts `state`, which starts at 0 after reset. The
// original snippets toggled on the button level with a busy-wait meant to
// slow the button down; this synchronise / debounce / edge-detect
// structure is this design's own way of getting one toggle per press. The
// default of 1,000,000 cycles (10 ms at 100 MHz) takes the loop count of
// the original busy-wait.
//
// Timing: `state` changes 3 + DEBOUNCE cycles after the button level
// settles high.
module button_toggle #(
  parameter int unsigned DEBOUNCE = 1_000_000
)(
  input  logic clk,
  input  logic rst,
  input  logic btn,
  output logic state
);

  localparam int unsigned CW = $clog2(DEBOUNCE + 1);

  logic [1:0]    sync;
  logic          stable;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync   <= '0;
      stable <= 1'b0;
      cnt    <= '0;
      state  <= 1'b0;
    end else begin
      sync  <= {sync[0], btn};
      if (sync[1] == stable) begin
        cnt <= '0;
      end else if (cnt == CW'(DEBOUNCE - 1)) begin
        cnt    <= '0;
        stable <= sync[1];
        if (sync[1]) state <= !state;
      end else begin
        cnt <= cnt + CW'(1);
      end
    end
  end

endmodule
