// calculations_tb -- self-checking test of the loop-body unit: random operand
// triples, result must equal their sum modulo 2^32 one cycle after start,
// with done pulsing for exactly one cycle.
module calculations_tb;
  localparam int unsigned DW = 32;
  logic               clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [2:0][DW-1:0] op = '0;
  logic               done;
  logic [DW-1:0]      result;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  calculations #(.DW(DW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [DW-1:0] e;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      op[0] = $urandom; op[1] = $urandom; op[2] = (n % 3 == 0) ? 32'hFFFF_FFFF : $urandom;
      e = op[0] + op[1] + op[2];
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      check(done, "done one cycle after start");
      check(result == e, $sformatf("result %0h expected %0h", result, e));
      @(negedge clk);
      check(!done, "done is a single pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
