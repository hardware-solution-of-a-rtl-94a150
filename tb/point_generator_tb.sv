// point_generator_tb -- self-checking test of the hyperplane point generator.
//
// For many (d, L, c) the generated points are compared, one by one and in
// order, with a brute-force enumeration of the box 0 <= i_k <= L_k in
// lexicographic order keeping the points with i_1+..+i_d = c.  With bounds
// large enough not to cut the hyperplane, the number of points is also
// compared with the closed recursion f_1(D) = D, f_c(D) = sum_{j=1..D}
// f_{c-1}(j).  Runs alternate between a sink that is always ready (where the
// gap between consecutive points must not exceed 2d cycles and the first
// point must come within d+3 cycles of start) and a sink that refuses at
// random, which exercises the stall path.  Empty hyperplanes (c above the
// sum of the bounds) must end with eoh and no point.
module point_generator_tb;
  localparam int unsigned IW   = 16;
  localparam int unsigned DMAX = 3;

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  logic                    start = 1'b0;
  logic [IW-1:0]           c = '0;
  logic [1:0]              d = '0;
  logic [DMAX-1:0][IW-1:0] l = '0;
  logic                    busy, eoh, out_valid;
  logic                    out_ready = 1'b1;
  logic [DMAX-1:0][IW-1:0] out_idx;
  logic [31:0]             n_found, n_reject, n_empty, n_stall;

  int checks = 0;
  int failures = 0;
  int n_stall_runs = 0;
  int n_empty_runs = 0;

  always #5 clk = ~clk;

  point_generator #(.IW(IW), .DMAX(DMAX)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Reference enumeration.
  function automatic void reference(input int dd, input int ll[3], input int cc,
                                    ref int pts[$][3]);
    int v[3];
    pts.delete();
    for (int a = 0; a <= (dd >= 1 ? ll[0] : 0); a++)
      for (int b = 0; b <= (dd >= 2 ? ll[1] : 0); b++)
        for (int e = 0; e <= (dd >= 3 ? ll[2] : 0); e++)
          if (a + b + e == cc) begin
            v[0] = a; v[1] = b; v[2] = e;
            pts.push_back(v);
          end
  endfunction

  // Number of solutions with unbounded indices, by the recursion of the theory.
  function automatic longint f(input int cc, input int dd);
    longint s;
    if (cc == 0) return 1;
    if (cc == 1) return dd;
    s = 0;
    for (int j = 1; j <= dd; j++) s += f(cc - 1, j);
    return s;
  endfunction

  task automatic run(input int dd, input int ll[3], input int cc, input bit random_sink);
    int pts[$][3];
    int got = 0;
    int cyc = 0, last_cyc = 0, first_cyc = -1, max_gap = 0;
    int k;
    bit ok;
    reference(dd, ll, cc, pts);
    @(negedge clk);
    d = 2'(dd);
    for (int i = 0; i < DMAX; i++) l[i] = IW'(ll[i]);
    c = IW'(cc);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    forever begin
      out_ready = random_sink ? ($urandom_range(0, 2) != 0) : 1'b1;
      @(posedge clk);
      cyc++;
      if (out_valid && out_ready) begin
        ok = (got < pts.size());
        for (k = 0; k < dd && ok; k++) ok = (int'(out_idx[k]) == pts[got][k]);
        check(ok, $sformatf("d=%0d c=%0d point %0d = %0d,%0d,%0d", dd, cc, got,
                            out_idx[0], out_idx[1], out_idx[2]));
        if (first_cyc < 0) first_cyc = cyc;
        else if (cyc - last_cyc > max_gap) max_gap = cyc - last_cyc;
        last_cyc = cyc;
        got++;
      end
      if (eoh) break;
      @(negedge clk);
    end
    out_ready = 1'b1;
    check(got == pts.size(), $sformatf("d=%0d c=%0d count %0d expected %0d", dd, cc, got, pts.size()));
    check(n_found == 32'(pts.size()), "n_found");
    check(n_reject == 0, "n_reject");
    if (!random_sink && got > 0) begin
      check(first_cyc <= dd + 3, $sformatf("first point after %0d cycles", first_cyc));
      check(max_gap <= 2 * dd, $sformatf("gap %0d cycles for d=%0d", max_gap, dd));
    end
    if (pts.size() == 0) n_empty_runs++;
    @(negedge clk);
    check(!busy, "busy after eoh");
  endtask

  initial begin
    int ll[3];
    int dd, cc, tot;
    longint unsigned stall0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Unbounded hyperplanes against the closed-form count.
    for (dd = 1; dd <= 3; dd++)
      for (cc = 0; cc <= 9; cc++) begin
        ll = '{40, 40, 40};
        run(dd, ll, cc, 1'b0);
        check(n_found == 32'(f(cc, dd)), $sformatf("f_%0d(%0d)", cc, dd));
      end

    // The example loop nest: L = (4, 3), every hyperplane.
    ll = '{4, 3, 0};
    for (cc = 0; cc <= 8; cc++) run(2, ll, cc, 1'b0);

    // Random bounds, with and without back-pressure.
    for (int n = 0; n < 60; n++) begin
      dd = $urandom_range(1, 3);
      ll[0] = $urandom_range(0, 7);
      ll[1] = $urandom_range(0, 7);
      ll[2] = $urandom_range(0, 7);
      tot = ll[0] + (dd > 1 ? ll[1] : 0) + (dd > 2 ? ll[2] : 0);
      cc = $urandom_range(0, tot + 2);
      stall0 = n_stall;
      run(dd, ll, cc, n[0]);
      if (n_stall != stall0) n_stall_runs++;
    end

    check(n_empty != 0, "empty hyperplane path never taken");
    check(n_empty_runs != 0, "no empty hyperplane tested");
    check(n_stall_runs != 0, "stall path never taken");
    $display("point_generator_tb: stall runs %0d, empty hyperplanes %0d", n_stall_runs, n_empty_runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
