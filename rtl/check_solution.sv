// check_solution -- the CheckSolution module at the end of the I-module chain.
//
// When the last active I-module signals that a complete index vector is
// present (sol_i), this block adds the active index values and, if the sum
// equals the parallel time c, stores the vector in its output register.
// Vectors whose sum differs are counted in n_reject and dropped (with the
// pruned enumeration of the chain this counter stays at zero; it is kept as a
// run-time self-check).  n_found counts accepted vectors since clear.
//
// Interface: sol_i + idx_i (indices of inactive stages, POS >= d, are ignored
// and delivered as 0); out_valid/out_ready/out_idx is a valid-ready output;
// stall_o is high while the output register is full and not being emptied,
// and must freeze the chain (and gates the capture of sol_i here).
// Timing: a vector is captured on the clock edge after sol_i and is offered
// on out_* from the next cycle.  The output handshake, the counters and the
// synchronous active-low reset are choices of this implementation; summing
// and comparing with c follows the source design.
module check_solution #(
  parameter int unsigned IW   = dioph_pkg::IW_DEF,
  parameter int unsigned DMAX = dioph_pkg::DMAX_DEF
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  logic [$clog2(DMAX+1)-1:0] d,
  input  logic [IW-1:0]             c,
  input  logic                      sol_i,
  input  logic [DMAX-1:0][IW-1:0]   idx_i,
  output logic                      stall_o,
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic [DMAX-1:0][IW-1:0]   out_idx,
  output logic [31:0]               n_found,
  output logic [31:0]               n_reject
);
  // Sum one bit wider than needed for DMAX indices so that it never wraps.
  localparam int unsigned SW = IW + $clog2(DMAX + 1);

  logic [SW-1:0]           sum;
  logic [DMAX-1:0][IW-1:0] masked;

  always_comb begin
    sum = '0;
    for (int k = 0; k < DMAX; k++) begin
      masked[k] = (k < 32'(d)) ? idx_i[k] : '0;
      sum       = sum + SW'(masked[k]);
    end
  end

  assign stall_o = out_valid && !out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_idx   <= '0;
      n_found   <= '0;
      n_reject  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (clear) begin
        n_found  <= '0;
        n_reject <= '0;
      end else if (sol_i && !stall_o) begin
        if (sum == SW'(c)) begin
          out_valid <= 1'b1;
          out_idx   <= masked;
          n_found   <= n_found + 1;
        end else begin
          n_reject  <= n_reject + 1;
        end
      end
    end
  end
endmodule
