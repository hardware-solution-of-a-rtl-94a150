// imodule -- one stage ("I-module") of the Point Generator chain.
//
// Each stage owns one index i_k of the equation i_1 + ... + i_D = c.  A stage
// is a small FSM that plays the part of one activation of the recursive
// refined enumeration: it is "called" from its left neighbour with the
// remainder r still to be distributed over itself and the stages to its
// right, walks its own index over every value that can still lead to a
// solution, "calls" the right neighbour once per value with r - i, and
// "returns" to the left neighbour once its range is exhausted.
//
// Range of the index, for a call with remainder r (the pruning rules):
//   hi = min(L_k, r)                 -- an index never exceeds its bound nor r
//   lo = max(0, r - RemSumL(k+1))    -- the stages to the right can absorb at
//                                       most the sum of their bounds
// The source algorithm loops from 0 and skips values that fail the second
// rule; this stage starts directly at lo, which gives the same calls to the
// right in fewer cycles (an implementation choice).
// The last active stage (POS == d-1) does not loop: it takes i = r, which the
// caller has already ensured lies within its bound, and returns at once,
// raising sol_o to tell CheckSolution that a full index vector is present.
//
// Interface (names as in the I-module chain drawing):
//   en_right_i / r_i : call from the left neighbour (one-cycle pulse + r)
//   en_right_o / r_o : call to the right neighbour
//   en_left_i        : return from the right neighbour (one-cycle pulse)
//   en_left_o        : return to the left neighbour
//   l                : this index's bound L_k
//   d                : number of active stages; stages with POS >= d are never
//                      called, the stage with POS == d-1 behaves as the last
//   rem_l            : sum of the bounds of the active stages right of this
//                      one, saturated at all-ones (supplied by the chain)
//   idx              : current index value
//   stall            : freezes every register (back-pressure from the FIFOs)
// Timing: all outputs are registered.  A call or return crosses one stage per
// clock, so consecutive solutions are at least two cycles apart.
// Reset (active-low, synchronous to clk) puts the stage in IDLE with index 0;
// the reset style is a choice of this implementation.
module imodule #(
  parameter int unsigned IW   = dioph_pkg::IW_DEF,
  parameter int unsigned DMAX = dioph_pkg::DMAX_DEF,
  parameter int unsigned POS  = 0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      stall,
  input  logic [$clog2(DMAX+1)-1:0] d,
  input  logic [IW-1:0]             l,
  input  logic [IW-1:0]             rem_l,
  input  logic                      en_right_i,
  input  logic [IW-1:0]             r_i,
  output logic                      en_right_o,
  output logic [IW-1:0]             r_o,
  input  logic                      en_left_i,
  output logic                      en_left_o,
  output logic [IW-1:0]             idx,
  output logic                      sol_o
);
  typedef enum logic {S_IDLE, S_WAIT} state_t;

  state_t        state;
  logic [IW-1:0] hi_q;
  logic          is_last;
  logic [IW-1:0] lo_c, hi_c;

  assign is_last = (32'(d) == POS + 1);

  // Index range for a call arriving with remainder r_i.
  always_comb begin
    lo_c = (r_i > rem_l) ? r_i - rem_l : '0;
    hi_c = (l < r_i) ? l : r_i;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      idx        <= '0;
      hi_q       <= '0;
      r_o        <= '0;
      en_right_o <= 1'b0;
      en_left_o  <= 1'b0;
      sol_o      <= 1'b0;
    end else if (!stall) begin
      en_right_o <= 1'b0;
      en_left_o  <= 1'b0;
      sol_o      <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (en_right_i) begin
            if (is_last) begin
              // Last index: its value is whatever is left of r.
              idx       <= r_i;
              sol_o     <= 1'b1;
              en_left_o <= 1'b1;
            end else if (lo_c <= hi_c) begin
              idx        <= lo_c;
              hi_q       <= hi_c;
              r_o        <= r_i - lo_c;
              en_right_o <= 1'b1;
              state      <= S_WAIT;
            end else begin
              // Empty range: return at once (cannot happen when the caller
              // applied the pruning rules, kept for robustness).
              en_left_o <= 1'b1;
            end
          end
        end
        S_WAIT: begin
          if (en_left_i) begin
            if (idx < hi_q) begin
              idx        <= idx + 1'b1;
              r_o        <= r_o - 1'b1;
              en_right_o <= 1'b1;
            end else begin
              en_left_o <= 1'b1;
              state     <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A stage is never called while it is still iterating, and never gets a
  // return it did not ask for.
  a_no_call_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_WAIT) |-> !en_right_i);
  a_no_stray_return: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE) |-> !en_left_i);
endmodule
