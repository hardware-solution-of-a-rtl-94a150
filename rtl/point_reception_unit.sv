// point_reception_unit -- the PE's end of the protocol with the Point
// Distributor.
//
// While the PE has nothing to do (no point held and the Memory Access Unit
// idle) it raises req.  When the distributor answers with a one-cycle gnt it
// captures the point on pt_idx, drops req, and offers the point to the Memory
// Access Unit on pt_valid/pt_idx_o until pt_ready takes it.  It asks for the
// next point only once the Memory Access Unit has finished the instance, so a
// raised req always means "this PE is idle" -- the distributor relies on that
// to tell the controller when all PEs are done.
// Timing: req follows the end of an instance by one cycle; the captured point
// is offered the cycle after gnt.  The source design names this unit and its
// role; the req/gnt protocol is a choice of this implementation.
module point_reception_unit #(
  parameter int unsigned IW   = dioph_pkg::IW_DEF,
  parameter int unsigned DMAX = dioph_pkg::DMAX_DEF
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // Distributor side.
  output logic                    req,
  input  logic                    gnt,
  input  logic [DMAX-1:0][IW-1:0] pt_idx,
  // Memory Access Unit side.
  input  logic                    mau_idle,
  output logic                    pt_valid,
  input  logic                    pt_ready,
  output logic [DMAX-1:0][IW-1:0] pt_idx_o,
  output logic [31:0]             n_recv
);
  logic held;

  assign req      = !held && mau_idle;
  assign pt_valid = held;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      held     <= 1'b0;
      pt_idx_o <= '0;
      n_recv   <= '0;
    end else begin
      if (held && pt_ready) held <= 1'b0;
      if (gnt && req) begin
        held     <= 1'b1;
        pt_idx_o <= pt_idx;
        n_recv   <= n_recv + 1;
      end
    end
  end

  a_gnt_only_on_req: assert property (@(posedge clk) disable iff (!rst_n) gnt |-> req);
endmodule
