// tb_pair_packer: random sample stream with gaps; every second sample
// yields one word with the older sample in lane 0, one cycle later.
module tb_pair_packer;
  import glinc_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  iq16_t in = '0;
  iq16_pair_t out;
  int checks = 0, failures = 0;
  iq16_t q[$];
  bit due = 0;
  iq16_t e0, e1;

  pair_packer dut (.*);

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

  always @(posedge clk) if (!rst) begin
    chk(out_valid == due, "valid timing");
    if (due) chk(out[0] == e0 && out[1] == e1, "pair content");
    due = 0;
    if (in_valid) begin
      q.push_back(in);
      if (q.size() == 2) begin e0 = q.pop_front(); e1 = q.pop_front(); due = 1; end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 10000; n++) begin
      in_valid = 1'($urandom_range(0, 2) != 0);
      in = iq16_t'($urandom);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
