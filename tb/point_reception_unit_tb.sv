// point_reception_unit_tb -- self-checking test of the Point Reception Unit.
//
// The testbench plays the distributor (grants while req is high, with a new
// point each time) and the Memory Access Unit (idle/busy, takes the point
// when idle).  It checks that req is high only when no point is held and the
// Memory Access Unit is idle, that the granted point is offered unchanged,
// and that it is offered until taken.
module point_reception_unit_tb;
  localparam int unsigned IW = 16;
  localparam int unsigned DMAX = 3;

  logic                    clk = 1'b0, rst_n = 1'b0;
  logic                    req, gnt = 1'b0;
  logic [DMAX-1:0][IW-1:0] pt_idx = '0;
  logic                    mau_idle = 1'b1, pt_valid, pt_ready = 1'b0;
  logic [DMAX-1:0][IW-1:0] pt_idx_o;
  logic [31:0]             n_recv;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  point_reception_unit #(.IW(IW), .DMAX(DMAX)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [DMAX-1:0][IW-1:0] sent;
    int busy_time;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      check(req && !pt_valid, "idle PE requests");
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        check(req, "request held until granted");
      end
      for (int k = 0; k < DMAX; k++) sent[k] = IW'($urandom);
      pt_idx = sent;
      gnt = 1'b1;
      @(negedge clk);
      gnt = 1'b0;
      pt_idx = '0;
      check(!req, "request dropped after grant");
      // Memory Access Unit takes a while before accepting.
      repeat ($urandom_range(0, 3)) begin
        check(pt_valid && pt_idx_o == sent, "point offered unchanged");
        @(negedge clk);
      end
      check(pt_valid && pt_idx_o == sent, "point offered unchanged");
      pt_ready = 1'b1;
      @(negedge clk);
      pt_ready = 1'b0;
      mau_idle = 1'b0;
      #1;
      check(!pt_valid, "point taken");
      busy_time = $urandom_range(1, 5);
      repeat (busy_time) begin
        check(!req, "no request while the Memory Access Unit is busy");
        @(negedge clk);
      end
      mau_idle = 1'b1;
      #1;
    end
    check(n_recv == 200, "n_recv");
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
