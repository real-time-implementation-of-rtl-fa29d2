// tb_rmm_scaler: QPSK mapping and magnitude scaling against real
// arithmetic: out = (bit ? -1 : +1) * m / sqrt2 * sqrt8, m forced to 1.0
// when RMM is off. Tolerance: 8 LSB of Q4.18, from the two truncated constants (relative
// error below 5e-6) and two truncated products.
module tb_rmm_scaler;
  import glinc_pkg::*;
  import tb_ref_pkg::*;

  logic mm_on, bit_i, bit_q;
  mm_coef_t coef_i, coef_q;
  gen_smp_t amp_i, amp_q;
  int checks = 0, failures = 0;

  rmm_scaler dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s m=%0d/%0d b=%0d%0d on=%0d out=%0d/%0d", what,
                                   coef_i, coef_q, bit_i, bit_q, mm_on, amp_i, amp_q);
    end
  endtask

  function automatic bit close(real e, int g);
    return (real'(g) - e <= 8.0) && (e - real'(g) <= 8.0);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int mi, mq;
      // RMM factors are magnitudes around 1 (0.5 .. 1.9)
      mi = $urandom_range(131072, 498000);
      mq = $urandom_range(131072, 498000);
      coef_i = mm_coef_t'(mi); coef_q = mm_coef_t'(mq);
      bit_i = 1'($urandom); bit_q = 1'($urandom);
      mm_on = (n % 3 != 0);
      #1;
      if (!mm_on) begin mi = 262144; mq = 262144; end
      chk(close(gen_amp(mi, bit_i), int'(amp_i)), "I");
      chk(close(gen_amp(mq, bit_q), int'(amp_q)), "Q");
      #9;
    end
    // unmodulated symbol is +/-2.0 in Q4.18 (524288) minus truncation
    mm_on = 0; bit_i = 0; bit_q = 1; #1;
    chk(amp_i > 22'sd524280 && amp_i <= 22'sd524288, "+2.0");
    chk(amp_q < -22'sd524280 && amp_q >= -22'sd524289, "-2.0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
