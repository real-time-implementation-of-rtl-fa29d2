// rrc_fir: two-channel root-raised-cosine pulse-shaping filter.
//
// One FIR per rail (in-phase and quadrature) with the same symmetric taps:
// a root-raised cosine with roll-off 0.25 at 8 samples per symbol spanning
// NSYM symbols on each side, 2*NSYM*8+1 taps (113 for the default NSYM = 7,
// 81 for NSYM = 5). Taps are Q0.16 numbers (glinc_pkg), inputs Q4.18 and
// outputs Q7.9, the lower bits being dropped (truncation) as in the
// original filter; the output wraps if it leaves the Q7.9 range. Filter
// response and formats are the original design's; the structure, a direct
// form with one full-precision adder tree per rail, is this design's own.
//
// Interface / timing: `in_valid` is the clock enable: each valid input pair
// is shifted into the delay lines, and the corresponding output pair appears
// with `out_valid` two cycles later (one register for the delay line, one
// for the output). One pair per clock. Delay lines clear at reset.
module rrc_fir
  import glinc_pkg::*;
#(
  parameter int unsigned NSYM = RRC_NSYM_MAX
)(
  input  logic    clk,
  input  logic    rst,
  input  logic    in_valid,
  input  gen_iq_t in,
  output logic    out_valid,
  output iq16_t   out
);

  localparam int unsigned NTAPS = 2*NSYM*UPS_L + 1;
  localparam int unsigned ACC_W = GEN_W + TAP_W + $clog2(NTAPS) + 1;
  localparam int unsigned SHIFT = GEN_FR + TAP_FR - RRC_FR;   // 25

  gen_smp_t dl_i [NTAPS];
  gen_smp_t dl_q [NTAPS];
  logic     vld_d;
  logic signed [ACC_W-1:0] acc_i, acc_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < int'(NTAPS); k++) begin
        dl_i[k] <= '0;
        dl_q[k] <= '0;
      end
      vld_d <= 1'b0;
    end else begin
      vld_d <= in_valid;
      if (in_valid) begin
        dl_i[0] <= in.i;
        dl_q[0] <= in.q;
        for (int k = 1; k < int'(NTAPS); k++) begin
          dl_i[k] <= dl_i[k-1];
          dl_q[k] <= dl_q[k-1];
        end
      end
    end
  end

  always_comb begin
    acc_i = '0;
    acc_q = '0;
    for (int k = 0; k < int'(NTAPS); k++) begin
      acc_i = acc_i + ACC_W'(rrc_tap(NSYM, k)) * ACC_W'(dl_i[k]);
      acc_q = acc_q + ACC_W'(rrc_tap(NSYM, k)) * ACC_W'(dl_q[k]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      out_valid <= vld_d;
      if (vld_d) begin
        out.i <= acc_i[SHIFT +: RRC_W];
        out.q <= acc_q[SHIFT +: RRC_W];
      end
    end
  end

endmodule
