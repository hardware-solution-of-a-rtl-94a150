// pg_workload_tb -- the point generator on large hyperplanes, as in the
// performance sweeps of the design: loop depth 2 with c = 0..1100 and loop
// depth 3 with c = 0..1250, bounds large enough (2000) not to cut any
// hyperplane, default parameters.
//
// For every c the number of points must equal the closed-form count
// C(c+D-1, D-1), every point must satisfy i_1+..+i_D = c, and the points must
// come in strictly increasing lexicographic order (which, together with the
// count, shows that each solution appears exactly once).  The cycles from
// start to eoh are printed for each c; they must not exceed 2 cycles per
// point, plus 2(D-1) per value of the first index (the walk back up the
// chain), plus 2D+4 for the start and the drain.
module pg_workload_tb;
  localparam int unsigned IW = dioph_pkg::IW_DEF;
  localparam int unsigned DMAX = dioph_pkg::DMAX_DEF;

  logic                    clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [IW-1:0]           c = '0;
  logic [1:0]              d = '0;
  logic [DMAX-1:0][IW-1:0] l = '{16'd2000, 16'd2000, 16'd2000};
  logic                    busy, eoh, out_valid;
  logic                    out_ready = 1'b1;
  logic [DMAX-1:0][IW-1:0] out_idx;
  logic [31:0]             n_found, n_reject, n_empty, n_stall;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  point_generator dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic sweep_point(input int dd, input int cc);
    longint expected, got, cyc;
    int sum_bad, order_bad;
    logic [3*IW-1:0] prev, key;
    bit have_prev;
    expected = (dd == 1) ? 1 : (dd == 2) ? cc + 1 : longint'(cc + 1) * (cc + 2) / 2;
    got = 0; cyc = 0; sum_bad = 0; order_bad = 0; have_prev = 0;
    @(negedge clk);
    d = 2'(dd);
    c = IW'(cc);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    forever begin
      @(posedge clk);
      cyc++;
      if (out_valid) begin
        int s = 0;
        for (int k = 0; k < dd; k++) s += int'(out_idx[k]);
        if (s != cc) sum_bad++;
        // Lexicographic key: i_1 most significant.
        key = {out_idx[0], out_idx[1], out_idx[2]};
        if (have_prev && !(key > prev)) order_bad++;
        prev = key;
        have_prev = 1;
        got++;
      end
      if (eoh) break;
    end
    check(got == expected, $sformatf("D=%0d c=%0d: %0d points, expected %0d", dd, cc, got, expected));
    check(sum_bad == 0, $sformatf("D=%0d c=%0d: %0d points off the hyperplane", dd, cc, sum_bad));
    check(order_bad == 0, $sformatf("D=%0d c=%0d: %0d points out of order", dd, cc, order_bad));
    check(cyc <= 2 * expected + 2 * (dd - 1) * (cc + 1) + 2 * dd + 4, $sformatf("D=%0d c=%0d: %0d cycles", dd, cc, cyc));
    $display("pg_workload_tb: D=%0d c=%0d points=%0d cycles=%0d", dd, cc, got, cyc);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cc = 0; cc <= 1100; cc += 100) sweep_point(2, cc);
    for (int cc = 0; cc <= 1250; cc += 250) sweep_point(3, cc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
