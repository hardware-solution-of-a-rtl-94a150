// load_balancer -- hyperplane-scheduled execution of a perfectly nested loop
// with unit dependencies on a pool of processing elements.
//
// Points of the iteration space with equal index sum t lie on one hyperplane
// and do not depend on each other, so each hyperplane can be run in
// parallel once the previous ones are complete.  The platform does exactly
// that:
//   controller        walks t = 0..t_last; for each t starts the generator,
//                     waits for its end-of-hyperplane report (eoh), then waits
//                     for the distributor's "all PEs idle" report (dist_idle);
//   point_generator   enumerates the points with i_1+..+i_d = t, 0<=i_k<=L_k
//                     (a chain of I-modules, one per index);
//   index_fifo x DMAX buffer the index values, one FIFO per dimension;
//   point_distributor hands points to requesting PEs, round-robin;
//   pe x NPE          fetch operands, compute the loop body, store the result;
//   mem_bus           shares the single main-memory port among the PEs.
// Main memory and the host are outside: the memory port (one request per
// cycle, read data the following cycle) and the host controls are ports.
// stats and pe_done count events (see dioph_pkg::lb_stats_t) for monitoring.
// Host use: set d, l, t_last (normally L_1+..+L_d), base and stride, pulse
// start, wait for done.
// Structure and the roles of the blocks follow the source design; widths,
// handshakes, FIFO depth and the number of PEs are choices of this
// implementation (see the package dioph_pkg and each block).
module load_balancer #(
  parameter int unsigned IW     = dioph_pkg::IW_DEF,
  parameter int unsigned DMAX   = dioph_pkg::DMAX_DEF,
  parameter int unsigned FDEPTH = dioph_pkg::FDEPTH_DEF,
  parameter int unsigned NPE    = dioph_pkg::NPE_DEF,
  parameter int unsigned AW     = dioph_pkg::AW_DEF,
  parameter int unsigned DW     = dioph_pkg::DW_DEF
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // Host.
  input  logic                      start,
  input  logic [IW-1:0]             t_last,
  input  logic [$clog2(DMAX+1)-1:0] d,
  input  logic [DMAX-1:0][IW-1:0]   l,
  input  logic [AW-1:0]             base,
  input  logic [DMAX-1:0][AW-1:0]   stride,
  output logic                      busy,
  output logic                      done,
  // Main memory.
  output logic                      mem_req,
  output logic                      mem_we,
  output logic [AW-1:0]             mem_addr,
  output logic [DW-1:0]             mem_wdata,
  input  logic [DW-1:0]             mem_rdata,
  // Statistics.
  output dioph_pkg::lb_stats_t      stats,
  output logic [NPE-1:0][31:0]      pe_done
);
  // Controller <-> generator / distributor.
  logic          t_valid, eoh, dist_idle;
  logic [IW-1:0] t;

  // Generator -> FIFOs -> distributor.
  logic                    pg_valid, pg_ready;
  logic [DMAX-1:0][IW-1:0] pg_idx;
  logic                    pg_busy_unused;
  logic [31:0]             pg_found_unused;
  logic [DMAX-1:0]         f_full, f_empty;
  logic [DMAX-1:0][IW-1:0] f_rdata;
  logic                    f_pop;

  // Distributor <-> PEs.
  logic [NPE-1:0]          pe_req, pe_gnt;
  logic [DMAX-1:0][IW-1:0] pt_idx;

  // PEs <-> bus.
  logic [NPE-1:0]          b_req, b_we, b_gnt, b_rvalid;
  logic [NPE-1:0][AW-1:0]  b_addr;
  logic [NPE-1:0][DW-1:0]  b_wdata;
  logic [DW-1:0]           b_rdata;

  controller #(.IW(IW)) u_ctrl (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (start),
    .t_last (t_last),
    .busy   (busy),
    .done   (done),
    .t_valid(t_valid),
    .t      (t),
    .eoh    (eoh),
    .dist_idle(dist_idle),
    .n_steps(stats.steps),
    .n_wait (stats.ctrl_wait)
  );

  point_generator #(.IW(IW), .DMAX(DMAX)) u_pg (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (t_valid),
    .c        (t),
    .d        (d),
    .l        (l),
    .busy     (pg_busy_unused),
    .eoh      (eoh),
    .out_valid(pg_valid),
    .out_ready(pg_ready),
    .out_idx  (pg_idx),
    .n_found  (pg_found_unused),
    .n_reject (stats.rejects),
    .n_empty  (stats.empty_planes),
    .n_stall  (stats.gen_stall)
  );

  // All index FIFOs move together: one entry per point in each of them.
  assign pg_ready = (f_full == '0);

  for (genvar k = 0; k < DMAX; k++) begin : g_fifo
    index_fifo #(.W(IW), .DEPTH(FDEPTH)) u_fifo (
      .clk  (clk),
      .rst_n(rst_n),
      .push (pg_valid && pg_ready),
      .wdata(pg_idx[k]),
      .pop  (f_pop),
      .rdata(f_rdata[k]),
      .full (f_full[k]),
      .empty(f_empty[k]),
      .count()
    );
  end

  point_distributor #(.IW(IW), .DMAX(DMAX), .NPE(NPE)) u_dist (
    .clk       (clk),
    .rst_n     (rst_n),
    .fifo_empty(f_empty[0]),
    .fifo_idx  (f_rdata),
    .fifo_pop  (f_pop),
    .req       (pe_req),
    .gnt       (pe_gnt),
    .pt_idx    (pt_idx),
    .all_idle  (dist_idle),
    .n_grant   (stats.points)
  );

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    pe #(.IW(IW), .DMAX(DMAX), .AW(AW), .DW(DW)) u_pe (
      .clk     (clk),
      .rst_n   (rst_n),
      .base    (base),
      .stride  (stride),
      .req     (pe_req[p]),
      .gnt     (pe_gnt[p]),
      .pt_idx  (pt_idx),
      .m_req   (b_req[p]),
      .m_we    (b_we[p]),
      .m_addr  (b_addr[p]),
      .m_wdata (b_wdata[p]),
      .m_gnt   (b_gnt[p]),
      .m_rvalid(b_rvalid[p]),
      .m_rdata (b_rdata),
      .n_done  (pe_done[p])
    );
  end

  mem_bus #(.NPE(NPE), .AW(AW), .DW(DW)) u_bus (
    .clk       (clk),
    .rst_n     (rst_n),
    .m_req     (b_req),
    .m_we      (b_we),
    .m_addr    (b_addr),
    .m_wdata   (b_wdata),
    .m_gnt     (b_gnt),
    .m_rvalid  (b_rvalid),
    .m_rdata   (b_rdata),
    .mem_req   (mem_req),
    .mem_we    (mem_we),
    .mem_addr  (mem_addr),
    .mem_wdata (mem_wdata),
    .mem_rdata (mem_rdata),
    .n_conflict(stats.bus_conflicts)
  );
endmodule
