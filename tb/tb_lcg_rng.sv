// tb_lcg_rng: checks the RNG seed sequence and symbols against the
// defining recurrence computed with 64-bit arithmetic, the reload port,
// reset to seed 357, and that the four symbols are roughly equally likely.
module tb_lcg_rng;
  import glinc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1, step = 0, load = 0;
  logic [SEED_W-1:0] seed_in = '0, seed;
  logic [1:0] sym;
  int checks = 0, failures = 0;
  int hist [4] = '{0, 0, 0, 0};
  longint ref_seed;

  lcg_rng dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s seed=%0d ref=%0d sym=%0d", what, seed, ref_seed, sym);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    ref_seed = 357;
    @(negedge clk);
    chk(seed == SEED_W'(ref_seed), "reset seed");
    for (int n = 0; n < 20000; n++) begin
      chk(seed == SEED_W'(ref_seed), "seed");
      chk(int'(sym) == lcg_sym(ref_seed), "symbol");
      hist[sym]++;
      // advance on a random subset of cycles
      step = ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (step) ref_seed = lcg_next(ref_seed);
      step = 0;
      @(negedge clk);
    end
    for (int k = 0; k < 4; k++) chk(hist[k] > 4000 && hist[k] < 6000, "uniformity");
    // reload
    @(negedge clk);
    seed_in = 20'd612359; load = 1; step = 1;
    @(negedge clk);
    load = 0; step = 0; ref_seed = 612359;
    chk(seed == SEED_W'(ref_seed), "load");
    step = 1; @(negedge clk); step = 0;
    ref_seed = lcg_next(ref_seed);
    chk(seed == SEED_W'(ref_seed), "step after load");
    $display("histogram %0d %0d %0d %0d", hist[0], hist[1], hist[2], hist[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
