// point_distributor_tb -- self-checking test of the Point Distributor.
//
// The testbench models the index FIFOs as a queue of numbered points and the
// PEs as agents that request, take a point on gnt, stay busy for a random
// time and request again.  It checks that every point is delivered exactly
// once and in FIFO order, that a grant goes to one requesting PE at a time,
// that with every PE requesting the grants rotate round-robin, and that
// all_idle is high exactly when the queue is empty, no grant is in flight and
// every PE requests.
module point_distributor_tb;
  localparam int unsigned IW = 16;
  localparam int unsigned DMAX = 3;
  localparam int unsigned NPE = 4;

  logic                    clk = 1'b0, rst_n = 1'b0;
  logic                    fifo_empty;
  logic [DMAX-1:0][IW-1:0] fifo_idx;
  logic                    fifo_pop;
  logic [NPE-1:0]          req;
  logic [NPE-1:0]          gnt;
  logic [DMAX-1:0][IW-1:0] pt_idx;
  logic                    all_idle;
  logic [31:0]             n_grant;

  int checks = 0, failures = 0;
  int q[$];
  int next_expected = 0;
  int busy_left[NPE];
  int last_pe = -1;
  int rr_checked = 0;

  always #5 clk = ~clk;

  point_distributor #(.IW(IW), .DMAX(DMAX), .NPE(NPE)) dut (.*);

  assign fifo_empty = (q.size() == 0);
  always_comb begin
    for (int k = 0; k < DMAX; k++) fifo_idx[k] = (q.size() > 0) ? IW'(q[0] + k) : '0;
  end
  always_comb for (int p = 0; p < NPE; p++) req[p] = (busy_left[p] == 0);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  int pushed = 0;
  bit all_req_mode = 1'b0;
  bit feed = 1'b1;
  bit rr_mode = 1'b0;
  bit will_pop = 1'b0;

  // All modelling happens at the falling edge, between two rising edges.
  always @(negedge clk) if (rst_n) begin
    check($countones(gnt) <= 1, "one grant at a time");
    for (int p = 0; p < NPE; p++) begin
      if (gnt[p]) begin
        check(int'(pt_idx[0]) == next_expected && int'(pt_idx[2]) == next_expected + 2,
              $sformatf("point %0d delivered, expected %0d", pt_idx[0], next_expected));
        next_expected++;
        if (rr_mode && last_pe >= 0) begin
          check(p == (last_pe + 1) % NPE, "round-robin order");
          rr_checked++;
        end
        last_pe = p;
        busy_left[p] = all_req_mode ? 1 : $urandom_range(1, 12);
      end else if (busy_left[p] > 0) begin
        busy_left[p]--;
      end
    end
    if (will_pop) void'(q.pop_front());
    if (feed && $urandom_range(0, 99) < 40) begin
      q.push_back(pushed);
      pushed++;
    end
    #1;
    check(all_idle == (q.size() == 0 && gnt == '0 && (&req)), "all_idle");
    will_pop = fifo_pop;
  end

  initial begin
    for (int p = 0; p < NPE; p++) busy_left[p] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (2000) @(negedge clk);
    all_req_mode = 1'b1;
    repeat (50) @(negedge clk);
    rr_mode = 1'b1;
    repeat (1000) @(negedge clk);
    rr_mode = 1'b0;
    all_req_mode = 1'b0;
    // Stop feeding and let everything drain.
    feed = 1'b0;
    wait (q.size() == 0);
    repeat (40) @(negedge clk);
    check(all_idle, "idle after drain");
    check(32'(next_expected) == n_grant, "n_grant");
    check(next_expected > 1000, "enough points delivered");
    check(rr_checked > 100, "round-robin observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
