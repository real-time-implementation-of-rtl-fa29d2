// tb_frame_counter: each done gives exactly 32 enabled cycles starting the
// cycle after the done; dones arriving during a burst are served by later
// bursts without a gap; the total enabled cycles equal 32 per done.
module tb_frame_counter;
  logic clk = 0, rst = 1, gen_done = 0, rrc_en, burst_start;
  int checks = 0, failures = 0;
  int owed = 0;         // cycles of enable the reference still owes
  int pending = 0;      // dones not yet started
  int burst_left = 0;
  int en_cycles = 0, dones = 0, joined = 0;

  frame_counter #(.BURST(32)) dut (.*);

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
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", what, $time); end
  endtask

  // reference: a burst of 32 starts the cycle after a done is available
  // and the counter is idle or in its last cycle
  bit exp_en, exp_start;
  always @(posedge clk) begin
    if (rst) begin
      burst_left = 0; pending = 0; exp_en = 0; exp_start = 0;
    end else begin
      chk(rrc_en == exp_en, "enable");
      chk(burst_start == exp_start, "burst_start");
      if (rrc_en) en_cycles++;
      if (gen_done) begin pending++; dones++; end
      exp_start = 0;
      if (burst_left > 0) burst_left--;
      if (burst_left == 0 && pending > 0) begin
        if (exp_en) joined++;
        pending--; burst_left = 32; exp_start = 1;
      end
      exp_en = (burst_left > 0);
    end
  end

  task automatic done_pulse();
    gen_done = 1; @(negedge clk); gen_done = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    // isolated frames
    for (int k = 0; k < 5; k++) begin done_pulse(); repeat (50) @(negedge clk); end
    // periodic dones every 32 cycles (streaming generator)
    for (int k = 0; k < 20; k++) begin done_pulse(); repeat (31) @(negedge clk); end
    repeat (40) @(negedge clk);
    // bunched dones (backlog)
    for (int k = 0; k < 3; k++) begin done_pulse(); repeat (5) @(negedge clk); end
    repeat (200) @(negedge clk);
    // random
    for (int k = 0; k < 3000; k++) begin
      if ($urandom_range(0, 40) == 0 && pending < 4) done_pulse(); else @(negedge clk);
    end
    repeat (300) @(negedge clk);
    chk(en_cycles == 32 * dones, "32 enabled cycles per done");
    chk(joined > 0, "back-to-back bursts happened");
    $display("dones %0d enabled %0d joined %0d", dones, en_cycles, joined);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
