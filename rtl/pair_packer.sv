// pair_packer: groups two adjacent samples into one DAC-path word.
//
// The DAC path of the transmitter carries two adjacent complex samples per
// clock, s[n] and s[n+1] (64 bits: four int16 values), and both LINC
// decomposers take their input in that form. The RRC filter produces one
// complex sample per valid cycle; this block holds the even sample and
// emits the pair, s[n] in lane 0 and s[n+1] in lane 1, when the odd one
// arrives. The pairing is the original design's; the block itself is this
// design's own glue.
//
// Timing: `out_valid` pulses in the cycle after every second `in_valid`.
// Synchronous active-high reset (the next sample starts a new pair).
module pair_packer
  import glinc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  iq16_t      in,
  output logic       out_valid,
  output iq16_pair_t out
);

  logic  have_even;
  iq16_t even;

  always_ff @(posedge clk) begin
    if (rst) begin
      have_even <= 1'b0;
      even      <= '0;
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (!have_even) begin
          even      <= in;
          have_even <= 1'b1;
        end else begin
          out[0]    <= even;
          out[1]    <= in;
          out_valid <= 1'b1;
          have_even <= 1'b0;
        end
      end
    end
  end

endmodule
