// controller -- the pacemaker of the load-balancing platform.
//
// Started by the host with the last time step t_last, it walks the parallel
// time t = 0, 1, ..., t_last.  For each t it dispatches t to the Point
// Generator (t_valid pulse with t), waits for the generator's end-of-
// hyperplane report (eoh), and then waits until the distributor reports that
// every point has been handed out and every PE is idle (dist_idle).  Only then does
// it move to t+1: the hyperplane t+1 may depend on results of hyperplane t, so
// this wait is what keeps the loop's data dependencies intact.  After t_last
// it pulses done.
// Counters: n_steps the time steps dispatched, n_wait the cycles spent after
// eoh waiting for the PEs (the stall that protects the dependencies).
// Timing: t_valid is a one-cycle registered pulse; between dist_idle going high
// and the next t_valid there is one cycle.  The start/done handshake with the
// host and the counters are choices of this implementation.
module controller #(
  parameter int unsigned IW = dioph_pkg::IW_DEF
) (
  input  logic          clk,
  input  logic          rst_n,
  // Host side.
  input  logic          start,
  input  logic [IW-1:0] t_last,
  output logic          busy,
  output logic          done,
  // Point Generator side.
  output logic          t_valid,
  output logic [IW-1:0] t,
  input  logic          eoh,
  // Point Distributor side.
  input  logic          dist_idle,
  // Statistics.
  output logic [31:0]   n_steps,
  output logic [31:0]   n_wait
);
  typedef enum logic [1:0] {C_IDLE, C_GEN, C_PE, C_NEXT} cstate_t;

  cstate_t       state;
  logic [IW-1:0] t_last_q;

  assign busy = (state != C_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= C_IDLE;
      t        <= '0;
      t_last_q <= '0;
      t_valid  <= 1'b0;
      done     <= 1'b0;
      n_steps  <= '0;
      n_wait   <= '0;
    end else begin
      t_valid <= 1'b0;
      done    <= 1'b0;
      unique case (state)
        C_IDLE: if (start) begin
          t        <= '0;
          t_last_q <= t_last;
          t_valid  <= 1'b1;
          n_steps  <= n_steps + 1;
          state    <= C_GEN;
        end
        C_GEN: if (eoh) state <= C_PE;
        C_PE: begin
          if (dist_idle) state <= C_NEXT;
          else      n_wait <= n_wait + 1;
        end
        C_NEXT: begin
          if (t == t_last_q) begin
            done  <= 1'b1;
            state <= C_IDLE;
          end else begin
            t       <= t + 1'b1;
            t_valid <= 1'b1;
            n_steps <= n_steps + 1;
            state   <= C_GEN;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end
endmodule
