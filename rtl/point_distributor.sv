// point_distributor -- hands the points buffered in the index FIFOs to the
// processing elements that ask for work.
//
// Each PE raises req[p] while it is idle.  When the FIFOs hold a point and at
// least one PE requests, the distributor pops the point (all index FIFOs at
// once), places it on pt_idx and pulses gnt[p] for one cycle to the chosen PE,
// which must capture pt_idx in that cycle and drop req.  PEs are chosen
// round-robin, starting after the last one served, so that no PE is starved.
// A PE granted in the previous cycle is not granted again before its request
// has had time to fall.
// all_idle ("dist" towards the controller) is high when the FIFOs are empty,
// no grant is in flight and every PE requests, i.e. every point handed out so
// far has been fully processed.  n_grant counts the points handed out.
// Timing: one point per clock at most; a grant follows a request by one cycle.
// The source design gives only the distributor's function; the req/gnt
// protocol, the round-robin choice and the meaning of "dist" are choices here.
module point_distributor #(
  parameter int unsigned IW   = dioph_pkg::IW_DEF,
  parameter int unsigned DMAX = dioph_pkg::DMAX_DEF,
  parameter int unsigned NPE  = dioph_pkg::NPE_DEF
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // From the index FIFOs (written and read together).
  input  logic                    fifo_empty,
  input  logic [DMAX-1:0][IW-1:0] fifo_idx,
  output logic                    fifo_pop,
  // To the processing elements.
  input  logic [NPE-1:0]          req,
  output logic [NPE-1:0]          gnt,
  output logic [DMAX-1:0][IW-1:0] pt_idx,
  // To the controller.
  output logic                    all_idle,
  output logic [31:0]             n_grant
);
  localparam int unsigned PW = (NPE > 1) ? $clog2(NPE) : 1;

  logic [NPE-1:0] elig;
  logic [PW-1:0]  last_q;   // PE served last
  logic [PW-1:0]  pick;
  logic           found;

  assign elig = req & ~gnt;

  // Round-robin: first eligible PE after last_q.
  always_comb begin
    int unsigned cand;
    pick  = '0;
    found = 1'b0;
    for (int unsigned o = 1; o <= NPE; o++) begin
      cand = (32'(last_q) + o) % NPE;
      if (!found && elig[cand]) begin
        pick  = PW'(cand);
        found = 1'b1;
      end
    end
  end

  assign fifo_pop = found && !fifo_empty;
  assign all_idle = fifo_empty && (gnt == '0) && (&req);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gnt     <= '0;
      pt_idx  <= '0;
      last_q  <= PW'(NPE - 1);
      n_grant <= '0;
    end else begin
      gnt <= '0;
      if (fifo_pop) begin
        gnt[pick] <= 1'b1;
        pt_idx    <= fifo_idx;
        last_q    <= pick;
        n_grant   <= n_grant + 1;
      end
    end
  end

  // A grant only goes to a PE that asked for one, and to one PE at a time.
  a_gnt_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_gnt_to_req: assert property (@(posedge clk) disable iff (!rst_n)
    (fifo_pop |=> ((gnt & $past(req)) == gnt)));
endmodule
