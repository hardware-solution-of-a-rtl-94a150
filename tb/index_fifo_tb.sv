// index_fifo_tb -- self-checking test of the index FIFO against a queue model:
// random pushes and pops (including both in one cycle, pushes when full and
// pops when empty), checking data order, full, empty and count every cycle.
module index_fifo_tb;
  localparam int unsigned W = 16;
  localparam int unsigned DEPTH = 5;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         push = 1'b0, pop = 1'b0;
  logic [W-1:0] wdata = '0, rdata;
  logic         full, empty;
  logic [2:0]   count;

  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0;
  logic [W-1:0] model[$];

  always #5 clk = ~clk;

  index_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    bit dp, dq;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      check(int'(count) == model.size(), "count");
      check(full == (model.size() == DEPTH), "full");
      check(empty == (model.size() == 0), "empty");
      if (model.size() > 0) check(rdata == model[0], "data order");
      if (full) n_full++;
      if (empty) n_empty++;
      // Bias towards filling in the first half, draining in the second.
      push  = ($urandom_range(0, 99) < ((n / 500) % 2 == 0 ? 70 : 30));
      pop   = ($urandom_range(0, 99) < ((n / 500) % 2 == 0 ? 30 : 70));
      wdata = W'($urandom);
      dp = push && (model.size() < DEPTH);
      dq = pop && (model.size() > 0);
      @(posedge clk);
      if (dq) void'(model.pop_front());
      if (dp) model.push_back(wdata);
    end
    check(n_full > 0 && n_empty > 0, "full and empty both reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
