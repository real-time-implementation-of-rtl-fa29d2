// tb_rmm_linc_tx_nsym5: end-to-end run of the transmitter built with the
// shorter pulse-shaping filter (filter case #1 of the original evaluation:
// Nsym = 5, 81 taps, the middle part of the 113-tap response) and a 64-cycle
// button debounce so the button presses take little simulated time.
//
// Same checks as tb_rmm_linc_tx_top: generator samples against the RNG /
// RMM table / mapping / upsampling reference (8 LSB tolerance), RRC output
// bit-exact against an 81-tap convolution of the generator samples, both
// LINC decomposers against real-valued decomposition, host channel cycle by
// cycle, one RRC output per clock in steady state, and counts of the
// mechanisms (RMM on/off, channel switch both ways, host stop, clipping,
// back-to-back Counter windows, generator state reload), each of which
// must occur.
module tb_rmm_linc_tx_nsym5;
  import glinc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1, run = 0, btn_rmm = 0, btn_sel = 0, host_stop = 0;
  logic [31:0] max_sq = 32'd250000;
  logic lut_we = 0;
  logic [RMM_AW-1:0] lut_waddr = '0;
  mm_coef_t lut_wi = '0, lut_wq = '0;
  logic gen_load = 0;
  logic [SEED_W-1:0] gen_seed_in = '0, gen_seed;
  logic [RMM_AW-1:0] gen_sreg_in = '0, gen_sreg;
  logic tx_lut_valid, tx_calc_valid, host_dval;
  iq16_pair_t tx_lut_left, tx_lut_right, tx_calc_left, tx_calc_right;
  logic [1:0] tx_calc_clip;
  logic [63:0] host_data;
  logic [5:0] led;

  rmm_linc_tx_top #(.RRC_NSYM(5), .DEBOUNCE(64)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int tab_i [16384], tab_q [16384];

  // mechanism counters
  int n_rmm_toggle = 0, n_sym_on = 0, n_sym_off = 0, n_sel_toggle = 0;
  int n_host_rrc = 0, n_host_linc = 0, n_host_stop = 0;
  int n_clip = 0, n_noclip = 0, n_bursts = 0, n_joined = 0, n_underflow = 0;
  int n_gen = 0, n_rrc = 0, n_lut = 0, n_calc = 0, n_loads = 0;

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s t=%0t", what, $time); end
  endtask

  // ------------------------------------------------ generator reference
  longint r_seed = 357;
  int r_sreg = 0;
  real e_on_i[$], e_on_q[$], e_off_i[$], e_off_q[$];
  int grace = 0;            // symbols for which either RMM state is accepted
  bit last_mm = 0;

  task automatic ref_symbol();
    int sym;
    bit bi, bq;
    sym = lcg_sym(r_seed);
    r_seed = lcg_next(r_seed);
    r_sreg = ((r_sreg << 2) | sym) & 16'h3fff;
    bi = r_sreg[6]; bq = r_sreg[7];
    for (int k = 0; k < 8; k++) begin
      e_on_i.push_back(k == 0 ? gen_amp(tab_i[r_sreg], bi) : 0.0);
      e_on_q.push_back(k == 4 ? gen_amp(tab_q[r_sreg], bq) : 0.0);
      e_off_i.push_back(k == 0 ? gen_amp(262144, bi) : 0.0);
      e_off_q.push_back(k == 4 ? gen_amp(262144, bq) : 0.0);
    end
  endtask

  function automatic bit close(real e, int g);
    return (real'(g) - e <= 8.0) && (e - real'(g) <= 8.0);
  endfunction

  // ------------------------------------------------ RRC reference
  gen_iq_t hist [$];
  iq16_t rrc_exp [$];
  iq16_t rrc_seen [$];

  function automatic shortint conv(bit qrail);
    longint acc;
    acc = 0;
    for (int k = 0; k < 81 && k < hist.size(); k++)
      acc += rrc_tap_q16(5, k) * longint'(qrail ? hist[k].q : hist[k].i);
    return rrc_out(acc);
  endfunction

  // ------------------------------------------------ LINC reference
  iq16_t pair_q [$];
  iq16_pair_t lut_exp [$], calc_exp [$];
  logic [31:0] max_at_pair [$];

  task automatic check_linc(iq16_pair_t s, iq16_pair_t l, iq16_pair_t r, bit table_mode,
                            logic [31:0] mx);
    for (int k = 0; k < 2; k++) begin
      real u, e, a, b, c, d;
      int x, y, tol;
      longint ul;
      x = s[k].i; y = s[k].q;
      ul = longint'(x)*x + longint'(y)*y;
      u = real'(ul);
      if (table_mode) begin
        longint ad;
        ad = (ul >> 11) & 4095;
        e = (ad == 0) ? real'(20'hFFFFF) / 16384.0 : $sqrt(4095.0 / real'(ad) - 1.0);
        tol = 2 + ((x < 0 ? -x : x) + (y < 0 ? -y : y)) / 16384;
      end else begin
        e = (ul == 0 || u > real'(mx)) ? 0.0 : $sqrt(real'(mx) / u - 1.0);
        tol = 1;
        if (u > real'(mx)) n_clip++; else n_noclip++;
      end
      linc_ref(x, y, e, a, b, c, d);
      chk(near(a, l[k].i, tol) && near(b, l[k].q, tol) && near(c, r[k].i, tol) && near(d, r[k].q, tol),
          $sformatf("%s LINC x=%0d y=%0d", table_mode ? "table" : "calculator", x, y));
    end
  endtask

  iq16_pair_t lut_in_q [$], calc_in_q [$];
  logic [31:0] calc_max_q [$];

  // ------------------------------------------------ host channel reference
  bit hv; logic [63:0] hd;
  bit prev_en = 0;

  always @(negedge clk) begin
    #1;
    if (!rst) begin
      // generator
      if (dut.u_gen.mm_on != last_mm) begin
        last_mm = dut.u_gen.mm_on; n_rmm_toggle++; grace = 3;
      end
      if (dut.gen_valid && dut.gen_ready) begin
        bit ok_on, ok_off;
        if (e_on_i.size() == 0) begin
          ref_symbol();
          if (grace > 0) grace--;
        end
        ok_on  = close(e_on_i[0],  int'(dut.gen_out.i)) && close(e_on_q[0],  int'(dut.gen_out.q));
        ok_off = close(e_off_i[0], int'(dut.gen_out.i)) && close(e_off_q[0], int'(dut.gen_out.q));
        if (dut.u_gen.out_phase == 0 && e_on_i[0] != e_off_i[0]) begin
          if (ok_on && !ok_off) n_sym_on++;
          if (ok_off && !ok_on) n_sym_off++;
        end
        if (grace > 0) chk(ok_on || ok_off, "generator sample");
        else           chk(last_mm ? ok_on : ok_off, "generator sample");
        void'(e_on_i.pop_front()); void'(e_on_q.pop_front());
        void'(e_off_i.pop_front()); void'(e_off_q.pop_front());
        n_gen++;
      end
      // counter / FIFO
      if (dut.rrc_en && dut.f0_empty) n_underflow++;
      if (dut.burst_start) begin n_bursts++; if (prev_en) n_joined++; end
      prev_en = dut.rrc_en;
      // RRC input/output
      if (dut.f0_rd) begin
        hist.push_front(dut.f0_data);
        if (hist.size() > 81) void'(hist.pop_back());
        rrc_exp.push_back('{i: conv(0), q: conv(1)});
      end
      if (dut.rrc_valid) begin
        chk(rrc_exp.size() > 0 && dut.rrc_out == rrc_exp[0], "RRC output");
        if (rrc_exp.size() > 0) void'(rrc_exp.pop_front());
        n_rrc++;
      end
      // LINC inputs (FIFO read side) -> expected queues
      if (dut.f1_rd) begin
        lut_in_q.push_back(dut.f1_data);
        calc_in_q.push_back(dut.f1_data);
        calc_max_q.push_back(max_sq);
      end
      if (tx_lut_valid) begin
        chk(lut_in_q.size() > 0, "table LINC output expected");
        if (lut_in_q.size() > 0) check_linc(lut_in_q.pop_front(), tx_lut_left, tx_lut_right, 1, 0);
        n_lut++;
      end
      if (tx_calc_valid) begin
        chk(calc_in_q.size() > 0, "calculator LINC output expected");
        if (calc_in_q.size() > 0) check_linc(calc_in_q.pop_front(), tx_calc_left, tx_calc_right, 0,
                                             calc_max_q.pop_front());
        n_calc++;
      end
      // host channel: one cycle behind its sources
      // (sampled 1 time unit after the falling edge, when stimulus is settled)
      chk(host_dval == hv && host_data == hd, "host channel");
      if (host_stop) begin hv = 0; hd = '0; n_host_stop++; end
      else if (dut.sel_linc) begin hv = tx_calc_valid; hd = tx_calc_left; if (tx_calc_valid) n_host_linc++; end
      else begin hv = dut.rrc_valid; hd = {dut.rrc_out, dut.rrc_out}; if (dut.rrc_valid) n_host_rrc++; end
    end else begin
      hv = 0; hd = '0;
    end
  end

  task automatic press(ref logic b, input bit want_rmm);
    bit was;
    int waited;
    was = want_rmm ? dut.mm_on : dut.sel_linc;
    b = 1;
    waited = 0;
    while ((want_rmm ? dut.mm_on : dut.sel_linc) == was && waited < 2_000_000) begin
      @(negedge clk); waited++;
    end
    chk(waited < 2_000_000, "button press took effect");
    repeat (5) @(negedge clk);
    b = 0;
    repeat (5) @(negedge clk);
    if (!want_rmm) n_sel_toggle++;
  endtask

  task automatic check_rate();
    int n0;
    n0 = n_rrc;
    repeat (320) @(negedge clk);
    chk(n_rrc - n0 == 320, "RRC one sample per clock in steady state");
  endtask

  initial begin
    hv = 0; hd = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    // load RMM tables
    for (int a = 0; a < 16384; a++) begin
      tab_i[a] = $urandom_range(170000, 360000);
      tab_q[a] = $urandom_range(170000, 360000);
      lut_we = 1; lut_waddr = RMM_AW'(a);
      lut_wi = mm_coef_t'(tab_i[a]); lut_wq = mm_coef_t'(tab_q[a]);
      @(negedge clk);
    end
    lut_we = 0;
    chk(led[1:0] == 2'b00 && led[4:3] == 2'b11, "LEDs after reset: RMM off, RRC selected");
    run = 1;
    repeat (2000) @(negedge clk);
    check_rate();
    // stop on the host side for a while
    host_stop = 1; repeat (100) @(negedge clk); host_stop = 0;
    // RMM on (button held until the debounced toggle; the stream keeps running)
    press(btn_rmm, 1);
    chk(led[1:0] == 2'b11, "RMM LEDs on");
    repeat (3000) @(negedge clk);
    // feedback channel to the LINC left branch
    press(btn_sel, 0);
    chk(led[4:3] == 2'b00, "RRC LEDs off");
    max_sq = 32'd60000;    // lower clipping level: more clipping
    repeat (3000) @(negedge clk);
    check_rate();
    // RMM off again and channel back to the RRC output
    press(btn_rmm, 1);
    press(btn_sel, 0);
    repeat (1000) @(negedge clk);
    run = 0;
    repeat (200) @(negedge clk);
    // generator state: read it back, then resume from a loaded state
    chk(longint'(gen_seed) == r_seed && int'(gen_sreg) == r_sreg, "generator state readout");
    gen_seed_in = 20'd123457; gen_sreg_in = 14'h2b5c; gen_load = 1;
    @(negedge clk);
    gen_load = 0;
    r_seed = 123457; r_sreg = 'h2b5c;
    n_loads++;
    run = 1;
    repeat (1000) @(negedge clk);
    run = 0;
    repeat (200) @(negedge clk);
    chk(longint'(gen_seed) == r_seed && int'(gen_sreg) == r_sreg, "generator state after resume");

    $display("generator %0d, RRC %0d, LINC table %0d, LINC calculator %0d", n_gen, n_rrc, n_lut, n_calc);
    $display("RMM toggles %0d, symbols with RMM %0d, without %0d", n_rmm_toggle, n_sym_on, n_sym_off);
    $display("channel toggles %0d, host RRC %0d, host LINC %0d, host stop %0d", n_sel_toggle, n_host_rrc, n_host_linc, n_host_stop);
    $display("clipped %0d, unclipped %0d, bursts %0d joined %0d, underflow %0d", n_clip, n_noclip, n_bursts, n_joined, n_underflow);
    chk(n_rmm_toggle >= 2, "RMM switched on and off");
    chk(n_sym_on > 0 && n_sym_off > 0, "symbols with and without RMM");
    chk(n_sel_toggle >= 2 && n_host_rrc > 0 && n_host_linc > 0, "channel switched both ways");
    chk(n_host_stop > 0, "host stop");
    chk(n_loads > 0, "generator state loaded and resumed");
    chk(n_clip > 0 && n_noclip > 0, "clipping and no clipping");
    chk(n_bursts > 0 && n_joined > 0, "Counter bursts, joined back to back");
    chk(n_underflow == 0, "Counter never enables on an empty FIFO");
    chk(n_lut == n_calc && n_lut > 0 && n_lut * 2 <= n_rrc, "both LINC outputs");
    chk(rrc_exp.size() == 0 && lut_in_q.size() == 0 && calc_in_q.size() == 0, "pipeline drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
