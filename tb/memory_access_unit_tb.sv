// memory_access_unit_tb -- self-checking test of the Memory Access Unit.
//
// The testbench provides a memory behind a bus that grants at random (or
// always, in the timing phase) and a stand-in for the Calculations unit that
// answers one cycle after start with the sum of the operands.  The array of
// the example loop (L = (4, 3), one halo row and column) is laid out as
// addr(I) = base + (i1+1)*stride1 + (i2+1)*stride2.  For random points the
// testbench checks that the word at addr(I) ends up holding
// a(I1-1,I2) + a(I1,I2-1) + a(I1-1,I2-1), that nothing else is written, and,
// with an uncontended bus, that one instance takes 10 cycles from the point
// being offered to the unit being idle again.
module memory_access_unit_tb;
  localparam int unsigned IW = 16, DMAX = 3, AW = 12, DW = 32;

  logic                    clk = 1'b0, rst_n = 1'b0;
  logic [AW-1:0]           base = 12'd100;
  logic [DMAX-1:0][AW-1:0] stride;
  logic                    pt_valid = 1'b0, pt_ready;
  logic [DMAX-1:0][IW-1:0] pt_idx = '0;
  logic                    idle;
  logic                    calc_start;
  logic [2:0][DW-1:0]      calc_op;
  logic                    calc_done = 1'b0;
  logic [DW-1:0]           calc_result = '0;
  logic                    m_req, m_we;
  logic [AW-1:0]           m_addr;
  logic [DW-1:0]           m_wdata;
  logic                    m_gnt;
  logic                    m_rvalid = 1'b0;
  logic [DW-1:0]           m_rdata = '0;
  logic [31:0]             n_done;

  logic [DW-1:0] mem [2**AW];
  logic [DW-1:0] ref_mem [2**AW];
  bit            contention = 1'b1;
  bit            gnt_rand;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  memory_access_unit #(.IW(IW), .DMAX(DMAX), .AW(AW), .DW(DW)) dut (.*);

  assign stride = '{12'd0, 12'd1, 12'd5};   // stride1 = L2 + 2 = 5, stride2 = 1
  assign m_gnt  = m_req && (!contention || gnt_rand);

  always @(negedge clk) gnt_rand = ($urandom_range(0, 2) != 0);

  // Memory and Calculations stand-ins.
  always @(posedge clk) begin
    m_rvalid  <= 1'b0;
    calc_done <= calc_start;
    if (calc_start) calc_result <= calc_op[0] + calc_op[1] + calc_op[2];
    if (m_req && m_gnt) begin
      if (m_we) mem[m_addr] <= m_wdata;
      else begin
        m_rdata  <= mem[m_addr];
        m_rvalid <= 1'b1;
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int a_addr(input int i1, input int i2);
    return 100 + (i1 + 1) * 5 + (i2 + 1);
  endfunction

  task automatic instance_run(input int i1, input int i2, input bit timed);
    int cyc = 0;
    int a;
    a = a_addr(i1, i2);
    ref_mem[a] = ref_mem[a_addr(i1 - 1, i2)] + ref_mem[a_addr(i1, i2 - 1)] +
                 ref_mem[a_addr(i1 - 1, i2 - 1)];
    @(negedge clk);
    check(idle && pt_ready, "idle before a point");
    pt_idx = '{16'd0, IW'(i2), IW'(i1)};
    pt_valid = 1'b1;
    @(negedge clk);
    pt_valid = 1'b0;
    cyc = 1;
    while (!idle && cyc < 200) begin
      @(negedge clk);
      cyc++;
    end
    if (timed) check(cyc == 10, $sformatf("instance took %0d cycles", cyc));
  endtask

  initial begin
    int i1, i2;
    for (int i = 0; i < 2**AW; i++) begin
      mem[i] = DW'($urandom_range(0, 1000));
      ref_mem[i] = mem[i];
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // The example loop in hyperplane order, with a contended bus.
    for (int t = 0; t <= 7; t++)
      for (i1 = 0; i1 <= 4; i1++) begin
        i2 = t - i1;
        if (i2 >= 0 && i2 <= 3) instance_run(i1, i2, 1'b0);
      end
    // Timing with a free bus.
    contention = 1'b0;
    for (int n = 0; n < 10; n++) instance_run($urandom_range(0, 4), $urandom_range(0, 3), 1'b1);
    repeat (2) @(negedge clk);
    for (int i = 0; i < 2**AW; i++) if (mem[i] != ref_mem[i]) check(1'b0, $sformatf("mem[%0d]=%0d expected %0d", i, mem[i], ref_mem[i]));
    for (int x = 0; x <= 4; x++) for (int y = 0; y <= 3; y++)
      check(mem[a_addr(x, y)] == ref_mem[a_addr(x, y)], "array element");
    check(n_done == 30, "n_done");
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
