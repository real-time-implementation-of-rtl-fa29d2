// rmm_activator: user switch that turns ring-type magnitude modulation on
// and off.
//
// Each press of the assigned push button (SW5 on the original board)
// inverts `mm_on`, which goes to the generator; RMM is off after reset, as
// in the original design. Two LEDs are lit while RMM is on and two further
// LEDs simply follow the (synchronised) button, again as in the original.
// Button conditioning is done by button_toggle (debounced over DEBOUNCE
// cycles, one toggle per press).
//
// Timing: see button_toggle; `mm_on` is a register output.
module rmm_activator #(
  parameter int unsigned DEBOUNCE = 1_000_000
)(
  input  logic       clk,
  input  logic       rst,
  input  logic       btn,
  output logic       mm_on,
  output logic [1:0] led_state,
  output logic       led_btn
);

  button_toggle #(.DEBOUNCE(DEBOUNCE)) u_btn (
    .clk, .rst, .btn, .state(mm_on)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      led_state <= '0;
      led_btn   <= 1'b0;
    end else begin
      led_state <= {2{mm_on}};
      led_btn   <= btn;
    end
  end

endmodule
