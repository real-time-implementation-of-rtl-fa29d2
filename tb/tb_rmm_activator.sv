// tb_rmm_activator: RMM starts off; each debounced press toggles it once,
// no matter how the contact bounces; glitches shorter than the debounce
// time do nothing; the state LEDs follow the state and the button LED the
// button. DEBOUNCE is shortened to 8 cycles.
module tb_rmm_activator;
  localparam int DB = 8;
  logic clk = 0, rst = 1, btn = 0, mm_on, led_btn;
  logic [1:0] led_state;
  int checks = 0, failures = 0;
  bit exp_state = 0;

  rmm_activator #(.DEBOUNCE(DB)) dut (.*);

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
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", what, $time); end
  endtask

  task automatic settle(bit level, int bounces);
    for (int k = 0; k < bounces; k++) begin
      btn = !btn; repeat ($urandom_range(1, DB - 3)) @(negedge clk);
    end
    btn = !level; repeat (3) @(negedge clk);
    btn = level;
    // state must not change before the debounce time has passed
    repeat (DB) @(negedge clk);
    chk(mm_on == exp_state, "no early toggle");
    repeat (6) @(negedge clk);
    if (level) exp_state = !exp_state;
    chk(mm_on == exp_state, "toggle after press");
    chk(led_state == {2{mm_on}}, "state LEDs");
    chk(led_btn == btn, "button LED");
    repeat (10) @(negedge clk);
    chk(mm_on == exp_state, "held");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    chk(mm_on == 0, "off after reset");
    for (int p = 0; p < 50; p++) begin
      settle(1, $urandom_range(0, 6));
      settle(0, $urandom_range(0, 6));
      // short glitch
      btn = 1; repeat (DB / 2) @(negedge clk); btn = 0;
      repeat (DB + 6) @(negedge clk);
      chk(mm_on == exp_state, "glitch ignored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
