// tb_linc_lut: table contents against sqrt(4095/a - 1) in Q6.14 and the
// printed table rows (entry 1 = 0xFFF00, entry 4091 = 512, entry 4095 = 0,
// entry 0 all ones); decomposition of random pairs against real arithmetic
// with e taken from bits 22..11 of |s|^2 (tolerance 1 LSB); S1 + S2 = s;
// 3-cycle latency at one pair per clock.
module tb_linc_lut;
  import glinc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  iq16_pair_t in = '0, left, right;
  int checks = 0, failures = 0;
  typedef struct { bit v; iq16_pair_t s; } stim_t;
  stim_t pipe [3];

  linc_lut dut (.*);

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
    if (!ok) begin failures++; if (failures < 12) $display("FAIL %s", what); end
  endtask

  function automatic real e_of(longint u);
    longint a;
    a = (u >> 11) & 4095;
    if (a == 0) return real'(20'hFFFFF) / 16384.0;
    return $sqrt(4095.0 / real'(a) - 1.0);
  endfunction

  task automatic check_lane(int l, iq16_t s);
    real e, a, b, c, d;
    int x, y;
    longint u;
    x = s.i; y = s.q;
    u = longint'(x)*x + longint'(y)*y;
    e = e_of(u);
    linc_ref(x, y, e, a, b, c, d);
    // table entries are 2^14 e rounded: allow the product error as well
    chk(near(a, left[l].i, 1 + (y < 0 ? -y : y) / 16384 + 1) && near(b, left[l].q, 2 + (x < 0 ? -x : x) / 16384) &&
        near(c, right[l].i, 2 + (y < 0 ? -y : y) / 16384) && near(d, right[l].q, 2 + (x < 0 ? -x : x) / 16384),
        $sformatf("branches x=%0d y=%0d e=%f got %0d %0d", x, y, e, left[l].i, left[l].q));
    if (e * (real'(x < 0 ? -x : x) + real'(y < 0 ? -y : y)) < 30000.0) begin
      int si, sq;
      si = int'(left[l].i) + int'(right[l].i);
      sq = int'(left[l].q) + int'(right[l].q);
      chk(si - x <= 2 && x - si <= 2 && sq - y <= 2 && y - sq <= 2, "S1+S2 = s");
    end
  endtask

  always @(posedge clk) if (!rst) begin
    chk(out_valid == pipe[2].v, "valid latency 3");
    if (pipe[2].v) for (int l = 0; l < 2; l++) check_lane(l, pipe[2].s[l]);
    pipe[2] = pipe[1]; pipe[1] = pipe[0];
    pipe[0].v = in_valid; pipe[0].s = in;
  end

  initial begin
    for (int k = 0; k < 3; k++) pipe[k].v = 0;
    // table rows
    chk(dut.rom[0] == 20'hFFFFF, "entry 0");
    chk(dut.rom[1] == 20'b11111111111100000000, "entry 1");
    chk(dut.rom[4091] == 20'b00000000001000000000, "entry 4091");
    chk(dut.rom[4095] == 20'd0, "entry 4095");
    for (int a = 1; a < 4096; a++) begin
      real ev;
      ev = $sqrt(4095.0 / real'(a) - 1.0) * 16384.0;
      if (ev > 1048575.0) ev = 1048575.0;
      chk(real'(dut.rom[a]) <= ev + 0.501 && real'(dut.rom[a]) >= ev - 0.501, $sformatf("entry %0d", a));
    end
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 6000; n++) begin
      int amp;
      in_valid = 1'($urandom_range(0, 5) != 0);
      amp = (n < 4000) ? 700 : 3000;
      for (int l = 0; l < 2; l++) begin
        in[l].i = smp16_t'($urandom_range(0, 2*amp) - amp);
        in[l].q = smp16_t'($urandom_range(0, 2*amp) - amp);
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (5) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
