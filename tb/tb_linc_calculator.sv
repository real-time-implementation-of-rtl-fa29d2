// tb_linc_calculator: random sample pairs and clipping levels against the
// real-valued decomposition e = sqrt(MAX/|s|^2 - 1) (0 when clipped or
// zero), branches (s +/- j e s)/2; tolerance 1 LSB. Also checks the LINC
// properties directly: S1 + S2 = s and |S1|^2 = MAX/4 for unclipped
// samples (constant envelope), the clip flags, and the 3-cycle latency at
// one pair per clock.
module tb_linc_calculator;
  import glinc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  iq16_pair_t in = '0, left, right;
  logic [31:0] max_sq = '0;
  logic [1:0] clip;
  int checks = 0, failures = 0;
  int nclip = 0, nzero = 0, nenv = 0;

  typedef struct { bit v; iq16_pair_t s; logic [31:0] mx; } stim_t;
  stim_t pipe [3];

  linc_calculator dut (.*);

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

  task automatic check_lane(int l, iq16_t s, logic [31:0] mx);
    real u, e, a, b, c, d;
    int x, y;
    x = s.i; y = s.q;
    u = real'(x)*x + real'(y)*y;
    if (u == 0.0 || u > real'(mx)) e = 0.0; else e = $sqrt(real'(mx)/u - 1.0);
    linc_ref(x, y, e, a, b, c, d);
    chk(near(a, left[l].i, 1) && near(b, left[l].q, 1) &&
        near(c, right[l].i, 1) && near(d, right[l].q, 1), $sformatf("branches x=%0d y=%0d max=%0d", x, y, mx));
    chk(clip[l] == (u > real'(mx)), "clip flag");
    if (u > real'(mx)) nclip++;
    if (u == 0.0) nzero++;
    // properties (only where no saturation can occur)
    if (e * (real'(x < 0 ? -x : x) + real'(y < 0 ? -y : y)) < 30000.0) begin
      int si, sq;
      si = int'(left[l].i) + int'(right[l].i);
      sq = int'(left[l].q) + int'(right[l].q);
      chk(si - x <= 2 && x - si <= 2 && sq - y <= 2 && y - sq <= 2, "S1+S2 = s");
      if (u > 0.0 && u <= real'(mx) && mx > 10000) begin
        real p;
        p = real'(left[l].i)*left[l].i + real'(left[l].q)*left[l].q;
        chk(p > real'(mx)/4.0 * 0.98 - 200 && p < real'(mx)/4.0 * 1.02 + 200, "constant envelope");
        nenv++;
      end
    end
  endtask

  always @(posedge clk) if (!rst) begin
    chk(out_valid == pipe[2].v, "valid latency 3");
    if (pipe[2].v) for (int l = 0; l < 2; l++) check_lane(l, pipe[2].s[l], pipe[2].mx);
    pipe[2] = pipe[1]; pipe[1] = pipe[0];
    pipe[0].v = in_valid; pipe[0].s = in; pipe[0].mx = max_sq;
  end

  initial begin
    for (int k = 0; k < 3; k++) pipe[k].v = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 6000; n++) begin
      int amp;
      in_valid = 1'($urandom_range(0, 5) != 0);
      amp = (n < 3000) ? 800 : 32767;
      max_sq = (n % 1000 < 500) ? 32'd490000 : 32'($urandom);
      for (int l = 0; l < 2; l++) begin
        in[l].i = smp16_t'($urandom_range(0, 2*amp) - amp);
        in[l].q = smp16_t'($urandom_range(0, 2*amp) - amp);
        if ($urandom_range(0, 50) == 0) in[l] = '0;
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (5) @(negedge clk);
    chk(nclip > 0 && nzero > 0 && nenv > 0, "clipped, zero and unclipped cases seen");
    $display("clipped %0d zero %0d envelope-checked %0d", nclip, nzero, nenv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
