// tb_generator: end-to-end check of the generator against a reference
// built from the defining equations: RNG recurrence, 14-bit symbol window
// (newest symbol in the low bits), RMM factor of the window applied to the
// middle symbol (bits 6 = I, 7 = Q), +/-1/sqrt2 mapping, sqrt(8) gain, x8
// upsampling with the Q rail 4 samples late. It loads random RMM tables,
// runs with RMM off and on (random output stalls), checks the frame_done
// pulse after every 32 samples, one sample per clock at full rate, and that
// the state ports let a reset generator resume the same sequence.
module tb_generator;
  import glinc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1, run = 0, mm_on = 0;
  logic out_valid, out_ready = 1, frame_done;
  gen_iq_t out;
  logic [2:0] out_phase;
  logic load = 0;
  logic [SEED_W-1:0] seed_in = '0, seed;
  logic [RMM_AW-1:0] sreg_in = '0, sreg;
  logic lut_we = 0;
  logic [RMM_AW-1:0] lut_waddr = '0;
  mm_coef_t lut_wi = '0, lut_wq = '0;

  int checks = 0, failures = 0;
  int tab_i [16384], tab_q [16384];
  longint r_seed = 357;
  int r_sreg = 0;
  real exp_i[$], exp_q[$];
  int nout = 0, ndone = 0, since_frame = 0;
  bit done_due = 0;
  bit stall = 0;

  generator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s n=%0d out=%0d/%0d", what, nout, out.i, out.q); end
  endtask

  // Reference: next symbol's 8 samples.
  task automatic ref_symbol();
    int sym, m_i, m_q;
    bit bi, bq;
    sym = lcg_sym(r_seed);
    r_seed = lcg_next(r_seed);
    r_sreg = ((r_sreg << 2) | sym) & 16'h3fff;
    bi = r_sreg[6]; bq = r_sreg[7];
    m_i = mm_on ? tab_i[r_sreg] : 262144;
    m_q = mm_on ? tab_q[r_sreg] : 262144;
    for (int k = 0; k < 8; k++) begin
      exp_i.push_back(k == 0 ? gen_amp(m_i, bi) : 0.0);
      exp_q.push_back(k == 4 ? gen_amp(m_q, bq) : 0.0);
    end
  endtask

  function automatic bit close(real e, int g);
    return (real'(g) - e <= 8.0) && (e - real'(g) <= 8.0);
  endfunction

  always @(posedge clk) begin
    if (rst) begin
      done_due = 0; since_frame = 0;
    end else begin
      chk(frame_done == done_due, "frame_done timing");
      if (frame_done) ndone++;
      done_due = 0;
      if (out_valid && out_ready) begin
        if (exp_i.size() == 0) ref_symbol();
        chk(close(exp_i[0], int'(out.i)) && close(exp_q[0], int'(out.q)), "sample");
        void'(exp_i.pop_front()); void'(exp_q.pop_front());
        nout++;
        since_frame++;
        if (since_frame == 32) begin since_frame = 0; done_due = 1; end
      end
    end
  end

  always @(negedge clk) out_ready <= stall ? 1'($urandom_range(0, 2) != 0) : 1'b1;

  task automatic drain();
    run = 0;
    repeat (30) @(negedge clk);
  endtask

  initial begin
    int n0;
    repeat (3) @(negedge clk);
    rst = 0;
    // load the RMM tables
    for (int a = 0; a < 16384; a++) begin
      tab_i[a] = $urandom_range(140000, 380000);
      tab_q[a] = $urandom_range(140000, 380000);
      lut_we = 1; lut_waddr = RMM_AW'(a);
      lut_wi = mm_coef_t'(tab_i[a]); lut_wq = mm_coef_t'(tab_q[a]);
      @(negedge clk);
    end
    lut_we = 0;
    // RMM off, full rate: latency and throughput
    mm_on = 0; run = 1;
    n0 = nout;
    repeat (3) @(negedge clk);
    chk(nout - n0 >= 1, "first sample within 3 cycles");
    n0 = nout;
    repeat (256) @(negedge clk);
    chk(nout - n0 == 256, "one sample per clock");
    stall = 1;
    repeat (2000) @(negedge clk);
    stall = 0;
    drain();
    chk(exp_i.size() == 0, "drained on symbol boundary");
    // RMM on
    mm_on = 1; run = 1; stall = 1;
    repeat (4000) @(negedge clk);
    stall = 0;
    drain();
    // state continuity: save, reset, restore, continue
    begin
      logic [SEED_W-1:0] s;
      logic [RMM_AW-1:0] r;
      s = seed; r = sreg;
      chk(longint'(s) == r_seed && int'(r) == r_sreg, "state ports");
      rst = 1; @(negedge clk); rst = 0;
      chk(seed == SEED_W'(357) && sreg == '0, "reset state");
      seed_in = s; sreg_in = r; load = 1; @(negedge clk); load = 0;
      run = 1;
      repeat (1000) @(negedge clk);
      drain();
    end
    chk(ndone == nout / 32 || ndone == nout / 32 - 1 || ndone > 0, "frames seen");
    $display("samples %0d frames %0d", nout, ndone);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
