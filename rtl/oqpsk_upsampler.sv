// oqpsk_upsampler: x8 zero-insertion upsampler with the OQPSK offset.
//
// Each accepted symbol (complex amplitude amp_i/amp_q) becomes L = 8 output
// samples. The in-phase impulse is sent in the first sample of the group and
// the quadrature impulse L/2 = 4 samples later, so the quadrature rail is
// delayed by half a symbol, s[n] = s_I[n] + j s_Q[n - L/2]; all other samples
// are zero. This follows the original generator; the handshake is this
// design's own.
//
// Interface / timing: valid/ready on both sides. A symbol is taken when
// sym_valid && sym_ready; its first sample is offered from the next cycle,
// and one sample leaves per cycle while out_ready is high, so a steady
// stream of symbols gives one sample per clock with no gaps. `out_phase`
// gives the position 0..L-1 of the current sample inside its group.
// Synchronous active-high reset.
module oqpsk_upsampler
  import glinc_pkg::*;
#(
  parameter int unsigned L = UPS_L
)(
  input  logic     clk,
  input  logic     rst,
  input  logic     sym_valid,
  output logic     sym_ready,
  input  gen_smp_t amp_i,
  input  gen_smp_t amp_q,
  output logic     out_valid,
  input  logic     out_ready,
  output gen_iq_t  out,
  output logic [$clog2(L)-1:0] out_phase
);

  localparam int unsigned PW = $clog2(L);

  logic           cur_valid;
  gen_smp_t       cur_i, cur_q;
  logic [PW-1:0]  phase;
  logic           out_fire, grp_end;

  assign out_fire  = cur_valid && out_ready;
  assign grp_end   = out_fire && (phase == PW'(L-1));
  assign sym_ready = !cur_valid || grp_end;

  always_ff @(posedge clk) begin
    if (rst) begin
      cur_valid <= 1'b0;
      phase     <= '0;
      cur_i     <= '0;
      cur_q     <= '0;
    end else begin
      if (out_fire) phase <= phase + PW'(1);
      if (sym_valid && sym_ready) begin
        cur_valid <= 1'b1;
        cur_i     <= amp_i;
        cur_q     <= amp_q;
        phase     <= '0;
      end else if (grp_end) begin
        cur_valid <= 1'b0;
      end
    end
  end

  always_comb begin
    out_valid = cur_valid;
    out_phase = phase;
    out.i     = (phase == '0)         ? cur_i : '0;
    out.q     = (phase == PW'(L / 2)) ? cur_q : '0;
  end

endmodule
