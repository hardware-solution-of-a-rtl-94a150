// load_balancer_tb -- end-to-end test of the whole platform at its default
// parameters.
//
// Three loop nests are executed, each on the same hardware without
// reconfiguring anything but the host inputs:
//   1. the two-deep example loop, I1 = 0..4, I2 = 0..3,
//        a(I1,I2) = a(I1-1,I2) + a(I1,I2-1) + a(I1-1,I2-1);
//   2. a three-deep loop, 0..7 in every index, with the same statement in the
//      first two indices (a(I1-1,I2,I3) + a(I1,I2-1,I3) + a(I1-1,I2-1,I3)),
//      whose large hyperplanes overflow the index FIFOs;
//   3. the example loop again, with the host asking for two time steps past
//      the last hyperplane (empty hyperplanes).
// The array lives in the main-memory model with one halo plane in front of
// every dimension holding random initial values.  After each run every
// element is compared with the value computed by the testbench in plain
// lexicographic loop order, and the number of points handed out is compared
// with the size of the iteration space.
// Mechanisms that must each occur at least once (counted, a failure if
// never): generator stall on full FIFOs, controller wait for busy PEs, empty
// hyperplane, contention on the memory bus, work done by every PE, and a
// change of loop depth between runs.
module load_balancer_tb;
  localparam int unsigned IW = dioph_pkg::IW_DEF;
  localparam int unsigned DMAX = dioph_pkg::DMAX_DEF;
  localparam int unsigned NPE = dioph_pkg::NPE_DEF;
  localparam int unsigned AW = dioph_pkg::AW_DEF;
  localparam int unsigned DW = dioph_pkg::DW_DEF;
  localparam int BASE = 256;

  logic                    clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [IW-1:0]           t_last = '0;
  logic [1:0]              d = '0;
  logic [DMAX-1:0][IW-1:0] l = '0;
  logic [AW-1:0]           base = AW'(BASE);
  logic [DMAX-1:0][AW-1:0] stride = '0;
  logic                    busy, done;
  logic                    mem_req, mem_we;
  logic [AW-1:0]           mem_addr;
  logic [DW-1:0]           mem_wdata, mem_rdata;
  dioph_pkg::lb_stats_t    stats;
  logic [NPE-1:0][31:0]    pe_done;

  int checks = 0, failures = 0;
  int depth_changes = 0;
  int last_depth = -1;

  always #5 clk = ~clk;

  load_balancer dut (.*);
  main_memory_model #(.AW(AW), .DW(DW)) u_mem (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Runs one loop nest with bounds lb[0..dd-1] and checks the array.
  task automatic run_loop(input int dd, input int lb[3], input int extra_steps);
    int n1, n2, n3, s0, s1, s2, sum_l, npts, pts0, cyc;
    int ref_mem [int];
    int a, v;
    n1 = lb[0];
    n2 = (dd > 1) ? lb[1] : 0;
    n3 = (dd > 2) ? lb[2] : 0;
    // Strides of the layout with one halo plane per dimension.
    s2 = (dd > 2) ? 1 : 0;
    s1 = (dd > 2) ? (n3 + 2) : 1;
    s0 = (n2 + 2) * ((dd > 2) ? (n3 + 2) : 1);
    sum_l = n1 + n2 + n3;
    npts = (n1 + 1) * (n2 + 1) * (n3 + 1);
    // Initial array: random halo, zero interior.
    for (int x = -1; x <= n1; x++)
      for (int y = -1; y <= n2; y++)
        for (int z = (dd > 2 ? -1 : 0); z <= n3; z++) begin
          a = BASE + (x + 1) * s0 + (y + 1) * s1 + (z + 1) * s2;
          v = (x < 0 || y < 0 || z < 0) ? $urandom_range(1, 5) : 0;
          u_mem.mem[a] = DW'(v);
          ref_mem[a] = v;
        end
    // Reference result in sequential loop order.
    for (int x = 0; x <= n1; x++)
      for (int y = 0; y <= n2; y++)
        for (int z = 0; z <= n3; z++) begin
          a = BASE + (x + 1) * s0 + (y + 1) * s1 + (z + 1) * s2;
          ref_mem[a] = int'(DW'(ref_mem[a - s0] + ref_mem[a - s1] + ref_mem[a - s0 - s1]));
        end
    if (last_depth >= 0 && last_depth != dd) depth_changes++;
    last_depth = dd;

    @(negedge clk);
    d = 2'(dd);
    l = '{IW'(n3), IW'(n2), IW'(n1)};
    stride = '{AW'(s2), AW'(s1), AW'(s0)};
    t_last = IW'(sum_l + extra_steps);
    pts0 = stats.points;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done && cyc < 200000) begin
      @(negedge clk);
      cyc++;
    end
    check(done, "run finished");
    $display("load_balancer_tb: d=%0d L=(%0d,%0d,%0d): %0d points in %0d cycles",
             dd, n1, n2, n3, int'(stats.points) - pts0, cyc);
    check(int'(stats.points) - pts0 == npts, $sformatf("points handed out %0d expected %0d",
                                                   int'(stats.points) - pts0, npts));
    for (int x = 0; x <= n1; x++)
      for (int y = 0; y <= n2; y++)
        for (int z = 0; z <= n3; z++) begin
          a = BASE + (x + 1) * s0 + (y + 1) * s1 + (z + 1) * s2;
          check(int'(u_mem.mem[a]) == ref_mem[a],
                $sformatf("a(%0d,%0d,%0d) = %0d expected %0d", x, y, z, u_mem.mem[a], ref_mem[a]));
        end
  endtask

  initial begin
    int lb[3];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    lb = '{4, 3, 0};
    run_loop(2, lb, 0);
    lb = '{7, 7, 7};
    run_loop(3, lb, 0);
    lb = '{4, 3, 0};
    run_loop(2, lb, 2);

    $display("load_balancer_tb: generator stall cycles %0d, controller wait cycles %0d, empty hyperplanes %0d, bus conflicts %0d, depth changes %0d",
             stats.gen_stall, stats.ctrl_wait, stats.empty_planes, stats.bus_conflicts, depth_changes);
    check(stats.gen_stall > 0, "generator stall never happened");
    check(stats.ctrl_wait > 0, "controller never waited for the PEs");
    check(stats.empty_planes > 0, "no empty hyperplane");
    check(stats.rejects == 0, "CheckSolution rejected a vector");
    check(stats.bus_conflicts > 0, "no bus contention");
    check(depth_changes > 0, "loop depth never changed");
    check(pe_done[0] > 0 && pe_done[1] > 0 &&
          pe_done[2] > 0 && pe_done[3] > 0, "a PE did no work");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
