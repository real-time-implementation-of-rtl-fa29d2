// tb_rmm_lut: checks the 1.0 initial content, writes random coefficients
// to random addresses and reads them back with the one-cycle read latency,
// including the read-before-write behaviour on an address collision.
module tb_rmm_lut;
  import glinc_pkg::*;

  logic clk = 0;
  logic rd_en = 0, wr_en = 0;
  logic [RMM_AW-1:0] rd_addr = '0, wr_addr = '0;
  mm_coef_t coef_i, coef_q, wr_coef_i = '0, wr_coef_q = '0;
  int checks = 0, failures = 0;
  mm_coef_t shadow_i [int], shadow_q [int];

  rmm_lut dut (.*);

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
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic mm_coef_t exp_i(int a); return shadow_i.exists(a) ? shadow_i[a] : mm_coef_t'(262144); endfunction
  function automatic mm_coef_t exp_q(int a); return shadow_q.exists(a) ? shadow_q[a] : mm_coef_t'(262144); endfunction

  initial begin
    @(negedge clk);
    // initial content is 1.0 (262144 in Q2.18)
    for (int n = 0; n < 200; n++) begin
      rd_en = 1; rd_addr = RMM_AW'($urandom);
      @(negedge clk);
      chk(coef_i == 20'sd262144 && coef_q == 20'sd262144, "initial 1.0");
    end
    rd_en = 0;
    // random writes
    for (int n = 0; n < 3000; n++) begin
      int a;
      a = $urandom_range(0, 16383);
      if (n % 7 == 0) a = $urandom_range(0, 15);   // force repeats
      wr_en = 1; wr_addr = RMM_AW'(a);
      wr_coef_i = mm_coef_t'($urandom); wr_coef_q = mm_coef_t'($urandom);
      shadow_i[a] = wr_coef_i; shadow_q[a] = wr_coef_q;
      @(negedge clk);
    end
    wr_en = 0;
    // read back (latency one cycle; rd_en low holds the output)
    for (int n = 0; n < 4000; n++) begin
      int a;
      a = (n % 2) ? $urandom_range(0, 16383) : $urandom_range(0, 15);
      rd_en = 1; rd_addr = RMM_AW'(a);
      @(negedge clk);
      rd_en = 0; rd_addr = RMM_AW'($urandom);
      chk(coef_i == exp_i(a) && coef_q == exp_q(a), "read back");
      @(negedge clk);
      chk(coef_i == exp_i(a) && coef_q == exp_q(a), "hold when rd_en low");
    end
    // collision: read returns old value, next read the new one
    rd_en = 1; rd_addr = 14'd5; wr_en = 1; wr_addr = 14'd5;
    wr_coef_i = 20'sd12345; wr_coef_q = -20'sd777;
    @(negedge clk);
    wr_en = 0;
    chk(coef_i == exp_i(5) && coef_q == exp_q(5), "read-before-write");
    @(negedge clk);
    chk(coef_i == 20'sd12345 && coef_q == -20'sd777, "new value after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
