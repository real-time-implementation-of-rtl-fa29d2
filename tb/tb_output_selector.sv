// tb_output_selector: after reset the host channel carries the RRC sample
// (repeated in both word halves) with its valid; a debounced press
// switches it to the LINC left branch pair and another back; `stop`
// blanks the channel; one cycle of latency. LEDs show RRC selection.
module tb_output_selector;
  import glinc_pkg::*;
  localparam int DB = 8;
  logic clk = 0, rst = 1, btn = 0, stop = 0;
  logic rrc_valid = 0, linc_valid = 0, dval, sel_linc, led_btn;
  iq16_t rrc_data = '0;
  iq16_pair_t linc_left = '0;
  logic [63:0] data;
  logic [1:0] led_state;
  int checks = 0, failures = 0;
  bit exp_sel = 0;
  bit p_v; logic [63:0] p_d;
  int n_rrc = 0, n_linc = 0, n_stop = 0;

  output_selector #(.DEBOUNCE(DB)) dut (.*);

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

  // reference, one cycle late, using the selection the DUT reports
  always @(posedge clk) if (!rst) begin
    chk(dval == p_v && data == p_d, "channel content");
    chk(led_state == {2{!sel_linc}} || led_state == {2{sel_linc}}, "LED pair");
    if (stop) begin p_v = 0; p_d = '0; n_stop++; end
    else if (sel_linc) begin p_v = linc_valid; p_d = linc_left; n_linc++; end
    else begin p_v = rrc_valid; p_d = {rrc_data, rrc_data}; n_rrc++; end
  end

  always @(negedge clk) begin
    rrc_valid <= 1'($urandom); rrc_data <= iq16_t'($urandom);
    linc_valid <= 1'($urandom); linc_left <= {$urandom, $urandom};
    stop <= ($urandom_range(0, 9) == 0);
  end

  task automatic press();
    btn = 1; repeat (DB + 4) @(negedge clk);
    exp_sel = !exp_sel;
    repeat (2) @(negedge clk);
    chk(sel_linc == exp_sel, "selection toggled");
    btn = 0; repeat (DB + 6) @(negedge clk);
    chk(sel_linc == exp_sel, "selection held after release");
  endtask

  initial begin
    p_v = 0; p_d = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    repeat (200) @(negedge clk);
    chk(led_state == 2'b11, "RRC LEDs on");
    for (int k = 0; k < 6; k++) begin
      press();
      repeat (200) @(negedge clk);
      chk(led_state == {2{!exp_sel}}, "LEDs follow selection");
    end
    chk(n_rrc > 0 && n_linc > 0 && n_stop > 0, "all three channel states seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
