// mem_bus_tb -- self-checking test of the shared memory bus.
//
// Four masters issue random reads and writes to their own address ranges,
// each holding a request until granted and waiting for its read data.  Behind
// the bus sits the main-memory model.  The testbench checks that at most one
// master is granted per cycle and only when it requests, that each read
// returns (to the right master, one cycle later) the last value that master
// wrote there, that a master requesting continuously is served within NPE
// cycles, and that contention occurred.
module mem_bus_tb;
  localparam int unsigned NPE = 4, AW = 10, DW = 32;

  logic                   clk = 1'b0, rst_n = 1'b0;
  logic [NPE-1:0]         m_req = '0, m_we = '0;
  logic [NPE-1:0][AW-1:0] m_addr = '0;
  logic [NPE-1:0][DW-1:0] m_wdata = '0;
  logic [NPE-1:0]         m_gnt, m_rvalid;
  logic [DW-1:0]          m_rdata;
  logic                   mem_req, mem_we;
  logic [AW-1:0]          mem_addr;
  logic [DW-1:0]          mem_wdata, mem_rdata;
  logic [31:0]            n_conflict;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  mem_bus #(.NPE(NPE), .AW(AW), .DW(DW)) dut (.*);
  main_memory_model #(.AW(AW), .DW(DW)) u_mem (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    check($countones(m_gnt) <= 1, "one grant per cycle");
    check((m_gnt & ~m_req) == '0, "grant only on request");
  end

  for (genvar p = 0; p < NPE; p++) begin : g_master
    initial begin
      logic [DW-1:0] shadow [16];
      int a, wait_cyc;
      for (int i = 0; i < 16; i++) shadow[i] = '0;
      wait (rst_n);
      // Clear this master's range first.
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        m_req[p] = 1'b1; m_we[p] = 1'b1; m_addr[p] = AW'(p * 16 + i); m_wdata[p] = '0;
        do @(negedge clk); while (!m_gnt[p]);
        m_req[p] = 1'b0;
      end
      for (int n = 0; n < 300; n++) begin
        a = $urandom_range(0, 15);
        m_req[p] = 1'b1;
        m_addr[p] = AW'(p * 16 + a);
        m_we[p] = ($urandom_range(0, 1) == 1);
        m_wdata[p] = $urandom;
        #1;
        wait_cyc = 0;
        while (!m_gnt[p]) begin
          @(negedge clk);
          wait_cyc++;
          #1;
        end
        check(wait_cyc < NPE, $sformatf("master %0d waited %0d cycles", p, wait_cyc));
        @(negedge clk);
        m_req[p] = 1'b0;
        if (m_we[p]) begin
          shadow[a] = m_wdata[p];
          check(!m_rvalid[p], "no read data after a write");
        end else begin
          check(m_rvalid[p], "read data one cycle after grant");
          check(m_rdata == shadow[a], $sformatf("master %0d read %0h expected %0h", p, m_rdata, shadow[a]));
        end
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (6000) @(negedge clk);
    check(n_conflict > 0, "contention observed");
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
