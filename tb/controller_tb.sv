// controller_tb -- self-checking test of the controller.
//
// The testbench stands in for the Point Generator (answers each dispatched
// time step with eoh after a random delay) and for the distributor (raises
// dist_idle a random time after eoh).  It checks that the time steps are
// 0, 1, ..., t_last in order, that no step is dispatched before the previous
// one has ended and the PEs have been reported idle (the stall that keeps
// the dependencies), that done follows the last step, and the counters.
module controller_tb;
  localparam int unsigned IW = 16;

  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [IW-1:0] t_last = '0;
  logic          busy, done, t_valid;
  logic [IW-1:0] t;
  logic          eoh = 1'b0, dist_idle = 1'b1;
  logic [31:0]   n_steps, n_wait;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  controller #(.IW(IW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic episode(input int last);
    int expect_t = 0;
    int steps0;
    int d1, d2, guard;
    steps0 = n_steps;
    @(negedge clk);
    t_last = IW'(last);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    forever begin
      check(t_valid, $sformatf("t_valid for step %0d", expect_t));
      check(int'(t) == expect_t, $sformatf("t=%0d expected %0d", t, expect_t));
      // Generator busy for a while: the controller must not move.
      d1 = $urandom_range(0, 6);
      dist_idle = 1'b0;
      repeat (d1) begin
        @(negedge clk);
        check(!t_valid && !done, "no dispatch while the generator runs");
      end
      eoh = 1'b1;
      @(negedge clk);
      eoh = 1'b0;
      // PEs still busy.
      d2 = $urandom_range(1, 8);
      repeat (d2) begin
        @(negedge clk);
        check(!t_valid && !done, "no dispatch while PEs are busy");
      end
      dist_idle = 1'b1;
      guard = 0;
      while (!t_valid && !done && guard < 10) begin
        @(negedge clk);
        guard++;
      end
      if (expect_t == last) begin
        check(done && !t_valid, "done after the last step");
        break;
      end
      check(t_valid, "next step dispatched");
      expect_t++;
    end
    check(int'(n_steps) - steps0 == last + 1, "n_steps");
    @(negedge clk);
    check(!busy, "idle after done");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    episode(0);
    episode(7);
    episode(3);
    check(n_wait > 0, "PE wait observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
