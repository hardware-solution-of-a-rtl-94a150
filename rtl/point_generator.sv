// point_generator -- enumerates the points of one hyperplane of a D-deep loop
// nest: every integer vector (i_1..i_D) with 0 <= i_p <= L_p and
// i_1 + ... + i_D = c, i.e. the loop instances that may run in parallel at
// time step c.
//
// Structure: a line of DMAX identical I-modules (imodule), one per index,
// followed by CheckSolution (check_solution).  Stage k is called from stage
// k-1 with the remainder r, walks its own index and calls stage k+1; the last
// active stage fixes its index to what is left of r and returns, at which
// moment the whole index vector is valid and CheckSolution stores it.  Only
// the first d stages take part, so the same hardware solves any depth
// 1 <= d <= DMAX, chosen at run time.
//
// Around the chain this block
//   * latches c, d and the bounds L at start, so that they stay constant
//     while the chain runs;
//   * supplies each stage with RemSumL(k+1), the sum of the bounds of the
//     active stages to its right (saturated at all-ones, which keeps every
//     comparison with an IW-bit remainder exact);
//   * skips the chain entirely when c exceeds the sum of all bounds or d is 0
//     (the hyperplane is empty) -- counted in n_empty;
//   * freezes the chain (stall) while the output register is full and the
//     FIFOs do not accept it.
// Interface: start/c is the time step dispatched by the controller ("t");
// eoh ("end of hyperplane") pulses for one cycle once the chain has returned
// and the last point has left the output register; busy is high in between.
// Points leave on out_valid/out_ready/out_idx.  n_found is the number of
// points of the current hyperplane, n_reject the vectors CheckSolution
// refused (zero in correct operation), n_empty the empty hyperplanes seen and
// n_stall the cycles the chain was frozen.
// Timing: one chain hop per clock; start to the first point is about d+1
// cycles, and points follow at least two cycles apart.
module point_generator #(
  parameter int unsigned IW   = dioph_pkg::IW_DEF,
  parameter int unsigned DMAX = dioph_pkg::DMAX_DEF
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [IW-1:0]             c,
  input  logic [$clog2(DMAX+1)-1:0] d,
  input  logic [DMAX-1:0][IW-1:0]   l,
  output logic                      busy,
  output logic                      eoh,
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic [DMAX-1:0][IW-1:0]   out_idx,
  output logic [31:0]               n_found,
  output logic [31:0]               n_reject,
  output logic [31:0]               n_empty,
  output logic [31:0]               n_stall
);
  localparam int unsigned DWID = $clog2(DMAX + 1);

  typedef enum logic [1:0] {G_IDLE, G_RUN, G_DRAIN} gstate_t;

  gstate_t                 gstate;
  logic [IW-1:0]           c_q;
  logic [DWID-1:0]         d_q;
  logic [DMAX-1:0][IW-1:0] l_q;
  logic [DMAX-1:0][IW-1:0] rem;     // RemSumL(k+1) for stage k
  logic [IW-1:0]           total_c; // sum of the active bounds of the request
  logic                    stall;
  logic                    kick;    // call into stage 0

  // Chain wiring: link k runs from stage k-1 to stage k.
  logic [DMAX:0]           en_r;
  logic [DMAX:0][IW-1:0]   r_w;
  logic [DMAX:0]           en_l;
  logic [DMAX-1:0][IW-1:0] idx;
  logic [DMAX-1:0]         sol;
  logic                    sol_any;

  // Saturating suffix sums of the latched bounds over the active stages.
  always_comb begin
    logic [IW:0] s;
    rem[DMAX-1] = '0;
    for (int k = DMAX - 2; k >= 0; k--) begin
      s = {1'b0, rem[k+1]} + ((k + 1 < 32'(d_q)) ? {1'b0, l_q[k+1]} : '0);
      rem[k] = s[IW] ? '1 : s[IW-1:0];
    end
  end

  // Saturating sum of the requested bounds, used for the empty-hyperplane test.
  always_comb begin
    logic [IW:0] s;
    total_c = '0;
    for (int k = 0; k < DMAX; k++) begin
      s = {1'b0, total_c} + ((k < 32'(d)) ? {1'b0, l[k]} : '0);
      total_c = s[IW] ? '1 : s[IW-1:0];
    end
  end

  assign en_r[0]    = kick;
  assign r_w[0]     = c_q;
  assign en_l[DMAX] = 1'b0;

  for (genvar k = 0; k < DMAX; k++) begin : g_stage
    imodule #(.IW(IW), .DMAX(DMAX), .POS(k)) u_im (
      .clk       (clk),
      .rst_n     (rst_n),
      .stall     (stall),
      .d         (d_q),
      .l         (l_q[k]),
      .rem_l     (rem[k]),
      .en_right_i(en_r[k]),
      .r_i       (r_w[k]),
      .en_right_o(en_r[k+1]),
      .r_o       (r_w[k+1]),
      .en_left_i (en_l[k+1]),
      .en_left_o (en_l[k]),
      .idx       (idx[k]),
      .sol_o     (sol[k])
    );
  end

  assign sol_any = |sol;

  check_solution #(.IW(IW), .DMAX(DMAX)) u_check (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (start && gstate == G_IDLE),
    .d        (d_q),
    .c        (c_q),
    .sol_i    (sol_any),
    .idx_i    (idx),
    .stall_o  (stall),
    .out_valid(out_valid),
    .out_ready(out_ready),
    .out_idx  (out_idx),
    .n_found  (n_found),
    .n_reject (n_reject)
  );

  assign busy = (gstate != G_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gstate  <= G_IDLE;
      c_q     <= '0;
      d_q     <= '0;
      l_q     <= '0;
      kick    <= 1'b0;
      eoh     <= 1'b0;
      n_empty <= '0;
      n_stall <= '0;
    end else begin
      eoh <= 1'b0;
      if (!stall) kick <= 1'b0;
      if (stall) n_stall <= n_stall + 1;
      unique case (gstate)
        G_IDLE: begin
          if (start) begin
            c_q <= c;
            d_q <= d;
            l_q <= l;
            if (d == '0 || 32'(d) > DMAX || c > total_c) begin
              // No point lies on this hyperplane: report at once.
              eoh     <= 1'b1;
              n_empty <= n_empty + 1;
            end else begin
              kick   <= 1'b1;
              gstate <= G_RUN;
            end
          end
        end
        G_RUN: begin
          // Stage 0 returning means the enumeration is complete.
          if (en_l[0] && !stall) gstate <= G_DRAIN;
        end
        G_DRAIN: begin
          if (!out_valid) begin
            eoh    <= 1'b1;
            gstate <= G_IDLE;
          end
        end
        default: gstate <= G_IDLE;
      endcase
    end
  end
endmodule
