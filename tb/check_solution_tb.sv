// check_solution_tb -- self-checking test of CheckSolution.
//
// Random index vectors are presented with sol_i; the testbench sums the
// active indices itself and checks that exactly the vectors whose sum equals
// c appear on the output (inactive indices cleared), that the others are
// counted as rejected, and that a full output register that is not read
// raises stall_o and blocks further captures.
module check_solution_tb;
  localparam int unsigned IW = 16;
  localparam int unsigned DMAX = 3;

  logic                    clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic [1:0]              d = 2'd3;
  logic [IW-1:0]           c = 16'd6;
  logic                    sol_i = 1'b0;
  logic [DMAX-1:0][IW-1:0] idx_i = '0;
  logic                    stall_o, out_valid;
  logic                    out_ready = 1'b1;
  logic [DMAX-1:0][IW-1:0] out_idx;
  logic [31:0]             n_found, n_reject;

  int checks = 0, failures = 0;
  int exp_found = 0, exp_reject = 0;

  always #5 clk = ~clk;

  check_solution #(.IW(IW), .DMAX(DMAX)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int s;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      d = 2'($urandom_range(1, 3));
      c = IW'($urandom_range(0, 9));
      for (int k = 0; k < DMAX; k++) idx_i[k] = IW'($urandom_range(0, 4));
      s = 0;
      for (int k = 0; k < int'(d); k++) s += int'(idx_i[k]);
      sol_i = 1'b1;
      @(negedge clk);
      sol_i = 1'b0;
      if (s == int'(c)) begin
        exp_found++;
        check(out_valid, "valid for a solution");
        for (int k = 0; k < DMAX; k++)
          check(out_idx[k] == ((k < int'(d)) ? idx_i[k] : '0), "stored vector");
      end else begin
        exp_reject++;
        check(!out_valid, "no output for a non-solution");
      end
      check(n_found == 32'(exp_found) && n_reject == 32'(exp_reject), "counters");
    end
    // Back-pressure.
    @(negedge clk);
    d = 2'd2; c = 16'd3; idx_i = '{16'd0, 16'd1, 16'd2};
    out_ready = 1'b0;
    sol_i = 1'b1;
    @(negedge clk);
    check(out_valid && stall_o, "stall when output is full and not read");
    idx_i = '{16'd0, 16'd2, 16'd1};
    @(negedge clk);
    check(out_idx[0] == 16'd2, "register not overwritten during stall");
    sol_i = 1'b0;
    out_ready = 1'b1;
    @(negedge clk);
    check(!out_valid && !stall_o, "drained");
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    check(n_found == 0 && n_reject == 0, "clear");
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
