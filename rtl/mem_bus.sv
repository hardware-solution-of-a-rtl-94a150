// mem_bus -- the shared bus between the processing elements and main memory.
//
// NPE masters compete for one memory port.  Each cycle the bus grants at most
// one requesting master, round-robin starting after the master granted last,
// and forwards its request (m_we/m_addr/m_wdata) to the memory.  The memory
// accepts one request per cycle and returns read data on mem_rdata in the
// cycle after the read was issued; the bus remembers which master issued the
// read and raises that master's m_rvalid with the data.  n_conflict counts
// cycles in which a requesting master had to wait for another.
// Timing: grant is combinational in the request cycle; read data arrive one
// cycle later.  The source design draws the bus but does not describe it; the
// arbitration and the memory timing are choices of this implementation.
module mem_bus #(
  parameter int unsigned NPE = dioph_pkg::NPE_DEF,
  parameter int unsigned AW  = dioph_pkg::AW_DEF,
  parameter int unsigned DW  = dioph_pkg::DW_DEF
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // Master side.
  input  logic [NPE-1:0]         m_req,
  input  logic [NPE-1:0]         m_we,
  input  logic [NPE-1:0][AW-1:0] m_addr,
  input  logic [NPE-1:0][DW-1:0] m_wdata,
  output logic [NPE-1:0]         m_gnt,
  output logic [NPE-1:0]         m_rvalid,
  output logic [DW-1:0]          m_rdata,
  // Memory side.
  output logic                   mem_req,
  output logic                   mem_we,
  output logic [AW-1:0]          mem_addr,
  output logic [DW-1:0]          mem_wdata,
  input  logic [DW-1:0]          mem_rdata,
  output logic [31:0]            n_conflict
);
  localparam int unsigned PW = (NPE > 1) ? $clog2(NPE) : 1;

  logic [PW-1:0]  last_q, pick;
  logic           found;
  logic           rd_pend;
  logic [PW-1:0]  rd_owner;

  always_comb begin
    int unsigned cand;
    pick  = '0;
    found = 1'b0;
    for (int unsigned o = 1; o <= NPE; o++) begin
      cand = (32'(last_q) + o) % NPE;
      if (!found && m_req[cand]) begin
        pick  = PW'(cand);
        found = 1'b1;
      end
    end
  end

  always_comb begin
    m_gnt = '0;
    if (found) m_gnt[pick] = 1'b1;
  end

  assign mem_req   = found;
  assign mem_we    = m_we[pick];
  assign mem_addr  = m_addr[pick];
  assign mem_wdata = m_wdata[pick];
  assign m_rdata   = mem_rdata;

  always_comb begin
    m_rvalid = '0;
    if (rd_pend) m_rvalid[rd_owner] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      last_q     <= PW'(NPE - 1);
      rd_pend    <= 1'b0;
      rd_owner   <= '0;
      n_conflict <= '0;
    end else begin
      rd_pend <= found && !m_we[pick];
      if (found) begin
        last_q   <= pick;
        rd_owner <= pick;
      end
      if ((m_req & ~m_gnt) != '0) n_conflict <= n_conflict + 1;
    end
  end
endmodule
