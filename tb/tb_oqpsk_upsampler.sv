// tb_oqpsk_upsampler: every symbol must give 8 samples, I impulse at
// position 0, Q impulse at position 4, zeros elsewhere, in order, under
// random stalls on both sides; with no stalls the rate is one sample per
// clock (8 symbols -> 64 samples in 64 cycles after the first).
module tb_oqpsk_upsampler;
  import glinc_pkg::*;

  logic clk = 0, rst = 1;
  logic sym_valid = 0, sym_ready, out_valid, out_ready = 0;
  gen_smp_t amp_i = '0, amp_q = '0;
  gen_iq_t out;
  logic [2:0] out_phase;
  int checks = 0, failures = 0;
  gen_smp_t qi[$], qq[$];
  int pos = 0;
  int nout = 0;
  bit stall_in = 1, stall_out = 1;

  oqpsk_upsampler dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s pos=%0d out=%0d/%0d", what, pos, out.i, out.q); end
  endtask

  // output checker
  always @(posedge clk) if (!rst && out_valid && out_ready) begin
    gen_smp_t ei, eq;
    ei = (pos == 0) ? qi[0] : '0;
    eq = (pos == 4) ? qq[0] : '0;
    chk(out.i == ei && out.q == eq, "sample");
    chk(int'(out_phase) == pos, "phase");
    nout++;
    pos++;
    if (pos == 8) begin pos = 0; void'(qi.pop_front()); void'(qq.pop_front()); end
  end

  // source
  always @(posedge clk) if (!rst) begin
    if (sym_valid && sym_ready) begin
      qi.push_back(amp_i); qq.push_back(amp_q);
    end
  end

  always @(negedge clk) if (!rst) begin
    if (!sym_valid || sym_ready) begin
      sym_valid <= stall_in ? 1'($urandom_range(0, 2) != 0) : 1'b1;
      amp_i <= gen_smp_t'($urandom); amp_q <= gen_smp_t'($urandom);
    end
    out_ready <= stall_out ? 1'($urandom_range(0, 3) != 0) : 1'b1;
  end

  initial begin
    int t0, n0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (5000) @(posedge clk);
    // full rate
    stall_in = 0; stall_out = 0;
    repeat (20) @(posedge clk);
    n0 = nout;
    repeat (64) @(posedge clk);
    chk(nout - n0 == 64, "one sample per clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
