// pe_tb -- self-checking test of one processing element.
//
// The PE is attached directly to the main-memory model (it is the only
// master, so every request is accepted at once) and the testbench acts as
// the Point Distributor: whenever req is high it grants the next point of
// the example loop nest (I1 = 0..4, I2 = 0..3, in hyperplane order).  The
// array a has one halo row and column holding random initial values.  At the
// end every element must equal the value computed by the testbench from
// a(I1,I2) = a(I1-1,I2) + a(I1,I2-1) + a(I1-1,I2-1), and the PE must have
// completed 20 instances at 11 cycles each (grant to renewed request).
module pe_tb;
  localparam int unsigned IW = 16, DMAX = 3, AW = 12, DW = 32;
  localparam int BASE = 64;

  logic                    clk = 1'b0, rst_n = 1'b0;
  logic [AW-1:0]           base = AW'(BASE);
  logic [DMAX-1:0][AW-1:0] stride;
  logic                    req, gnt = 1'b0;
  logic [DMAX-1:0][IW-1:0] pt_idx = '0;
  logic                    m_req, m_we, m_gnt;
  logic                    m_rvalid = 1'b0;
  logic [AW-1:0]           m_addr;
  logic [DW-1:0]           m_wdata, m_rdata;
  logic [31:0]             n_done;

  int checks = 0, failures = 0;
  int ref_a [-1:4][-1:3];

  always #5 clk = ~clk;
  assign stride = '{12'd0, 12'd1, 12'd5};
  assign m_gnt  = m_req;

  pe #(.IW(IW), .DMAX(DMAX), .AW(AW), .DW(DW)) dut (.*);
  main_memory_model #(.AW(AW), .DW(DW)) u_mem (
    .clk(clk), .mem_req(m_req), .mem_we(m_we), .mem_addr(m_addr),
    .mem_wdata(m_wdata), .mem_rdata(m_rdata));
  always @(posedge clk) m_rvalid <= m_req && !m_we;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int addr_of(input int i1, input int i2);
    return BASE + (i1 + 1) * 5 + (i2 + 1);
  endfunction

  initial begin
    int cyc;
    for (int x = -1; x <= 4; x++)
      for (int y = -1; y <= 3; y++) begin
        ref_a[x][y] = (x < 0 || y < 0) ? $urandom_range(1, 9) : 0;
        u_mem.mem[addr_of(x, y)] = DW'(ref_a[x][y]);
      end
    for (int t = 0; t <= 7; t++)
      for (int x = 0; x <= 4; x++)
        if (t - x >= 0 && t - x <= 3)
          ref_a[x][t - x] = ref_a[x - 1][t - x] + ref_a[x][t - x - 1] + ref_a[x - 1][t - x - 1];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t <= 7; t++)
      for (int x = 0; x <= 4; x++)
        if (t - x >= 0 && t - x <= 3) begin
          cyc = 0;
          while (!req && cyc < 100) begin
            @(negedge clk);
            cyc++;
          end
          if (t + x > 0) check(cyc == 10, $sformatf("grant-to-request %0d cycles", cyc + 1));
          pt_idx = '{16'd0, IW'(t - x), IW'(x)};
          gnt = 1'b1;
          @(negedge clk);
          gnt = 1'b0;
          pt_idx = '{16'd0, IW'($urandom_range(0, 3)), IW'($urandom_range(0, 4))};
          check(!req, "request dropped after grant");
        end
    while (!req) @(negedge clk);
    for (int x = 0; x <= 4; x++)
      for (int y = 0; y <= 3; y++)
        check(int'(u_mem.mem[addr_of(x, y)]) == ref_a[x][y],
              $sformatf("a(%0d,%0d)=%0d expected %0d", x, y, u_mem.mem[addr_of(x, y)], ref_a[x][y]));
    check(n_done == 20, "n_done");
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
