// tb_rrc_fir: both filter lengths (Nsym = 7, 113 taps, and Nsym = 5, 81
// taps) against a convolution computed in the testbench from the
// published real-valued RRC taps rounded to Q0.16; random Q4.18 inputs
// with random enable gaps, impulses (the output must reproduce the taps),
// and the two-cycle latency.
module tb_rrc_fir;
  import glinc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1, in_valid = 0;
  gen_iq_t in = '0;
  logic v7, v5;
  iq16_t o7, o5;
  int checks = 0, failures = 0;
  longint hi7 [$], hq7 [$];
  gen_iq_t hist [$];
  shortint ei7, eq7, ei5, eq5;
  bit due1 = 0, due2 = 0;
  shortint p_i7, p_q7, p_i5, p_q5;

  rrc_fir #(.NSYM(7)) dut7 (.clk, .rst, .in_valid, .in, .out_valid(v7), .out(o7));
  rrc_fir #(.NSYM(5)) dut5 (.clk, .rst, .in_valid, .in, .out_valid(v5), .out(o5));

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
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s got %0d/%0d exp %0d/%0d", what, o7.i, o7.q, p_i7, p_q7); end
  endtask

  function automatic shortint conv(int nsym, bit qrail);
    longint acc;
    int n;
    n = 2*nsym*8 + 1;
    acc = 0;
    for (int k = 0; k < n && k < hist.size(); k++)
      acc += rrc_tap_q16(nsym, k) * longint'(qrail ? hist[k].q : hist[k].i);
    return rrc_out(acc);
  endfunction

  always @(posedge clk) if (!rst) begin
    chk(v7 == due2 && v5 == due2, "latency 2");
    if (due2) begin
      chk(o7.i == p_i7 && o7.q == p_q7, "113-tap output");
      chk(o5.i == p_i5 && o5.q == p_q5, "81-tap output");
    end
    due2 = due1;
    p_i7 = ei7; p_q7 = eq7; p_i5 = ei5; p_q5 = eq5;
    due1 = in_valid;
    if (in_valid) begin
      hist.push_front(in);
      if (hist.size() > 113) void'(hist.pop_back());
      ei7 = conv(7, 0); eq7 = conv(7, 1);
      ei5 = conv(5, 0); eq5 = conv(5, 1);
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    // impulse of +1.0 on I and -1.0 on Q: output = taps (scaled 2^-7)
    in_valid = 1; in.i = 22'sd262144; in.q = -22'sd262144;
    @(negedge clk);
    in = '0;
    repeat (120) @(negedge clk);
    // random generator-like stream: impulses of up to +/-2.5 every 8 samples
    for (int n = 0; n < 3000; n++) begin
      in_valid = 1'($urandom_range(0, 4) != 0);
      in.i = (n % 8 == 0) ? gen_smp_t'($urandom_range(0, 1310720) - 655360) : '0;
      in.q = (n % 8 == 4) ? gen_smp_t'($urandom_range(0, 1310720) - 655360) : '0;
      @(negedge clk);
    end
    // full-scale random input (output may wrap, must still match)
    for (int n = 0; n < 1000; n++) begin
      in_valid = 1;
      in.i = gen_smp_t'($urandom); in.q = gen_smp_t'($urandom);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (4) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
