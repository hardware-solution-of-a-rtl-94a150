// imodule_tb -- self-checking test of one I-module stage.
//
// The stage under test sits at position 0.  The testbench plays its left
// neighbour (issues a call with remainder r) and its right neighbour (answers
// every call with a return after a random delay), and checks that the stage
// calls right once for every index value in [max(0, r - rem_l), min(L, r)],
// in increasing order, with r_o = r - idx, and then returns left exactly
// once.  With d = 1 the same stage is the last one: it must take idx = r,
// raise sol_o and return on the next cycle.  A stall held during a call must
// freeze the stage.
module imodule_tb;
  localparam int unsigned IW = 16;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          stall = 1'b0;
  logic [1:0]    d = 2'd2;
  logic [IW-1:0] l = '0, rem_l = '0, r_i = '0;
  logic          en_right_i = 1'b0, en_left_i = 1'b0;
  logic          en_right_o, en_left_o, sol_o;
  logic [IW-1:0] r_o, idx;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  imodule #(.IW(IW), .DMAX(3), .POS(0)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic call_inner(input int ll, input int rr, input int rem);
    int lo, hi, expect_i, cyc;
    lo = (rr > rem) ? rr - rem : 0;
    hi = (ll < rr) ? ll : rr;
    @(negedge clk);
    d = 2'd2; l = IW'(ll); rem_l = IW'(rem); r_i = IW'(rr);
    en_right_i = 1'b1;
    @(negedge clk);
    en_right_i = 1'b0;
    expect_i = lo;
    cyc = 0;
    forever begin
      if (en_right_o) begin
        check(expect_i <= hi, $sformatf("call beyond hi: idx=%0d hi=%0d", idx, hi));
        check(int'(idx) == expect_i, $sformatf("idx %0d expected %0d", idx, expect_i));
        check(int'(r_o) == rr - expect_i, $sformatf("r_o %0d expected %0d", r_o, rr - expect_i));
        expect_i++;
        repeat ($urandom_range(0, 3)) @(negedge clk);
        en_left_i = 1'b1;
        @(negedge clk);
        en_left_i = 1'b0;
      end else if (en_left_o) begin
        break;
      end else begin
        @(negedge clk);
      end
      cyc++;
      if (cyc > 1000) begin
        check(1'b0, "no return");
        break;
      end
    end
    check(expect_i == hi + 1, $sformatf("calls ended at %0d, expected %0d (L=%0d r=%0d rem=%0d)",
                                        expect_i, hi + 1, ll, rr, rem));
    @(negedge clk);
    check(!en_left_o && !en_right_o, "extra pulse after return");
  endtask

  initial begin
    int ll, rr, rem;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Hand-picked cases: the example loop L=(4,3) at c=5, then edges.
    call_inner(4, 5, 3);
    call_inner(0, 0, 0);
    call_inner(7, 3, 10);
    call_inner(2, 9, 7);
    for (int n = 0; n < 100; n++) begin
      ll  = $urandom_range(0, 12);
      rem = $urandom_range(0, 12);
      rr  = $urandom_range(0, ll + rem);
      call_inner(ll, rr, rem);
    end

    // As the last stage.
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      d = 2'd1; l = 16'd100; r_i = IW'($urandom_range(0, 100));
      en_right_i = 1'b1;
      @(negedge clk);
      en_right_i = 1'b0;
      check(sol_o && en_left_o && !en_right_o, "last stage: sol/return");
      check(idx == r_i, "last stage: idx = r");
      @(negedge clk);
      check(!sol_o && !en_left_o, "last stage: single pulse");
    end

    // Stall freezes the stage.
    @(negedge clk);
    d = 2'd2; l = 16'd5; rem_l = 16'd5; r_i = 16'd4;
    en_right_i = 1'b1;
    @(negedge clk);
    en_right_i = 1'b0;
    check(en_right_o && idx == 0, "stall test: first call");
    stall = 1'b1;
    en_left_i = 1'b1;
    repeat (3) @(negedge clk);
    check(en_right_o && idx == 0, "stall holds the stage");
    stall = 1'b0;
    @(negedge clk);
    en_left_i = 1'b0;
    check(en_right_o && idx == 1 && r_o == 3, "stage moves on after stall");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
