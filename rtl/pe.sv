// pe -- a processing element of the load-balancing platform.
//
// Three units in line: the Point Reception Unit obtains a loop-instance index
// vector from the Point Distributor, the Memory Access Unit turns it into
// addresses, fetches the operands and later stores the result, and the
// Calculations unit evaluates the loop body.  The composition follows the
// source design's PE drawing; the signals between the units are this
// implementation's (see each unit).
// Interface: req/gnt/pt_idx to the distributor (req high means the PE is
// idle), one memory master port to the shared bus, base/stride describing the
// array layout, n_done the loop instances completed.
module pe #(
  parameter int unsigned IW   = dioph_pkg::IW_DEF,
  parameter int unsigned DMAX = dioph_pkg::DMAX_DEF,
  parameter int unsigned AW   = dioph_pkg::AW_DEF,
  parameter int unsigned DW   = dioph_pkg::DW_DEF
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [AW-1:0]           base,
  input  logic [DMAX-1:0][AW-1:0] stride,
  output logic                    req,
  input  logic                    gnt,
  input  logic [DMAX-1:0][IW-1:0] pt_idx,
  output logic                    m_req,
  output logic                    m_we,
  output logic [AW-1:0]           m_addr,
  output logic [DW-1:0]           m_wdata,
  input  logic                    m_gnt,
  input  logic                    m_rvalid,
  input  logic [DW-1:0]           m_rdata,
  output logic [31:0]             n_done
);
  logic                    mau_idle, pt_valid, pt_ready;
  logic [DMAX-1:0][IW-1:0] pt_held;
  logic                    calc_start, calc_done;
  logic [2:0][DW-1:0]      calc_op;
  logic [DW-1:0]           calc_result;
  logic [31:0]             n_recv_unused;

  point_reception_unit #(.IW(IW), .DMAX(DMAX)) u_pru (
    .clk     (clk),
    .rst_n   (rst_n),
    .req     (req),
    .gnt     (gnt),
    .pt_idx  (pt_idx),
    .mau_idle(mau_idle),
    .pt_valid(pt_valid),
    .pt_ready(pt_ready),
    .pt_idx_o(pt_held),
    .n_recv  (n_recv_unused)
  );

  memory_access_unit #(.IW(IW), .DMAX(DMAX), .AW(AW), .DW(DW)) u_mau (
    .clk        (clk),
    .rst_n      (rst_n),
    .base       (base),
    .stride     (stride),
    .pt_valid   (pt_valid),
    .pt_ready   (pt_ready),
    .pt_idx     (pt_held),
    .idle       (mau_idle),
    .calc_start (calc_start),
    .calc_op    (calc_op),
    .calc_done  (calc_done),
    .calc_result(calc_result),
    .m_req      (m_req),
    .m_we       (m_we),
    .m_addr     (m_addr),
    .m_wdata    (m_wdata),
    .m_gnt      (m_gnt),
    .m_rvalid   (m_rvalid),
    .m_rdata    (m_rdata),
    .n_done     (n_done)
  );

  calculations #(.DW(DW)) u_calc (
    .clk   (clk),
    .rst_n (rst_n),
    .start (calc_start),
    .op    (calc_op),
    .done  (calc_done),
    .result(calc_result)
  );
endmodule
