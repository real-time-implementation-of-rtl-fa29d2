// output_selector: feedback channel to the host.
//
// The transmitter sends one stream back to the host for inspection,
// through the output data FIFO of the board firmware. Each press of the
// assigned push button (SW7 on the original board) switches that stream
// between the RRC filter output and the LINC left branch; after reset it is
// the RRC output. The RRC sample (32 bits, I and Q) is repeated in both
// halves of the 64-bit word; the LINC word carries the two adjacent left
// branch samples. While `stop` is high (the FIFO asks the source to pause)
// the channel sends no valid data and an all-zero word. Two LEDs are lit
// while the RRC output is selected, two others follow the button. All of
// this follows the original snippet; the button conditioning (button_toggle)
// is this design's own.
//
// Timing: registered, one cycle from the selected input to `dval/data`.
module output_selector
  import glinc_pkg::*;
#(
  parameter int unsigned DEBOUNCE = 1_000_000
)(
  input  logic        clk,
  input  logic        rst,
  input  logic        btn,
  input  logic        stop,
  input  logic        rrc_valid,
  input  iq16_t       rrc_data,
  input  logic        linc_valid,
  input  iq16_pair_t  linc_left,
  output logic        dval,
  output logic [63:0] data,
  output logic        sel_linc,
  output logic [1:0]  led_state,
  output logic        led_btn
);

  button_toggle #(.DEBOUNCE(DEBOUNCE)) u_btn (
    .clk, .rst, .btn, .state(sel_linc)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      dval      <= 1'b0;
      data      <= '0;
      led_state <= '0;
      led_btn   <= 1'b0;
    end else begin
      led_state <= {2{!sel_linc}};
      led_btn   <= btn;
      if (stop) begin
        dval <= 1'b0;
        data <= '0;
      end else if (sel_linc) begin
        dval <= linc_valid;
        data <= linc_left;
      end else begin
        dval <= rrc_valid;
        data <= {rrc_data, rrc_data};
      end
    end
  end

endmodule
