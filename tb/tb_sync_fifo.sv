// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, the fall-through output, full/empty/count, and that the FIFO
// fills to exactly DEPTH entries.
module tb_sync_fifo;
  localparam int W = 20, DEPTH = 8;
  logic clk = 0, rst = 1, wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  int nfull = 0;

  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

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

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int n = 0; n < 20000; n++) begin
      int bias;
      bias = (n / 1000) % 2;   // alternate fill-heavy and drain-heavy phases
      // check state before the edge
      chk(int'(count) == q.size(), "count");
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == DEPTH), "full");
      if (q.size() > 0) chk(rd_data == q[0], "data");
      if (full) nfull++;
      wr_en = !full && ($urandom_range(0, 3) < (bias ? 3 : 1));
      rd_en = !empty && ($urandom_range(0, 3) < (bias ? 1 : 3));
      wr_data = W'($urandom);
      @(posedge clk);
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
      @(negedge clk);
    end
    chk(nfull > 0, "reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
