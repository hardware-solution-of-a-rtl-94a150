// memory_access_unit -- the PE's path to main memory.
//
// A received point I = (i_1..i_DMAX) is turned into the address of its
// element of the loop's array, as an offset from a base address:
//     addr(I) = base + sum_k (i_k + 1) * stride_k
// The "+1" leaves one halo row/column in front of every dimension, so the
// elements a(I1-1, .) and a(., I2-1) read at the edge of the iteration space
// are ordinary memory words holding the initial values.  Unused dimensions
// are given stride 0.
// For one loop instance the unit reads the three operands of the example
// statement, a(I - e1), a(I - e2) and a(I - e1 - e2) (e1, e2: unit steps in
// the first two dimensions), starts the Calculations unit, and writes the
// result to addr(I).
//
// Memory port (shared bus): m_req with m_we/m_addr/m_wdata is held until
// m_gnt accepts it; read data returns on m_rvalid/m_rdata one or more cycles
// after acceptance.  One access is outstanding at a time.
// Timing: with an uncontended bus, an instance takes 3 x 2 cycles of reads,
// 1 cycle of calculation and 1 cycle of write, plus one cycle to accept the
// point: about 9 cycles.  Address arithmetic is modulo 2^AW.
// The source design says that index values offset a base address and that
// operands are fetched and results stored through this unit; the address
// formula, the halo and the bus protocol are choices of this implementation.
module memory_access_unit #(
  parameter int unsigned IW   = dioph_pkg::IW_DEF,
  parameter int unsigned DMAX = dioph_pkg::DMAX_DEF,
  parameter int unsigned AW   = dioph_pkg::AW_DEF,
  parameter int unsigned DW   = dioph_pkg::DW_DEF
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // Layout of the array in memory.
  input  logic [AW-1:0]           base,
  input  logic [DMAX-1:0][AW-1:0] stride,
  // Point from the Point Reception Unit.
  input  logic                    pt_valid,
  output logic                    pt_ready,
  input  logic [DMAX-1:0][IW-1:0] pt_idx,
  output logic                    idle,
  // Calculations unit.
  output logic                    calc_start,
  output logic [2:0][DW-1:0]      calc_op,
  input  logic                    calc_done,
  input  logic [DW-1:0]           calc_result,
  // Memory port.
  output logic                    m_req,
  output logic                    m_we,
  output logic [AW-1:0]           m_addr,
  output logic [DW-1:0]           m_wdata,
  input  logic                    m_gnt,
  input  logic                    m_rvalid,
  input  logic [DW-1:0]           m_rdata,
  output logic [31:0]             n_done
);
  typedef enum logic [2:0] {M_IDLE, M_RD_REQ, M_RD_WAIT, M_CALC, M_WR} mstate_t;

  mstate_t             state;
  logic [AW-1:0]       addr_q;   // addr(I)
  logic [1:0]          nrd;      // operands fetched so far
  logic [AW-1:0]       addr_c;
  logic [AW-1:0]       s0, s1;

  assign s0 = stride[0];
  assign s1 = (DMAX > 1) ? stride[DMAX > 1 ? 1 : 0] : '0;

  always_comb begin
    addr_c = base;
    for (int k = 0; k < DMAX; k++)
      addr_c = addr_c + AW'((AW'(pt_idx[k]) + 1'b1) * stride[k]);
  end

  assign idle     = (state == M_IDLE);
  assign pt_ready = idle;

  // Request lines follow the state.
  always_comb begin
    m_req   = 1'b0;
    m_we    = 1'b0;
    m_addr  = addr_q;
    m_wdata = calc_result;
    unique case (state)
      M_RD_REQ: begin
        m_req = 1'b1;
        unique case (nrd)
          2'd0:    m_addr = addr_q - s0;
          2'd1:    m_addr = addr_q - s1;
          default: m_addr = addr_q - s0 - s1;
        endcase
      end
      M_WR: begin
        m_req = 1'b1;
        m_we  = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= M_IDLE;
      addr_q     <= '0;
      nrd        <= '0;
      calc_op    <= '0;
      calc_start <= 1'b0;
      n_done     <= '0;
    end else begin
      calc_start <= 1'b0;
      unique case (state)
        M_IDLE: if (pt_valid) begin
          addr_q <= addr_c;
          nrd    <= '0;
          state  <= M_RD_REQ;
        end
        M_RD_REQ: if (m_gnt) state <= M_RD_WAIT;
        M_RD_WAIT: if (m_rvalid) begin
          calc_op[nrd] <= m_rdata;
          if (nrd == 2'd2) begin
            calc_start <= 1'b1;
            state      <= M_CALC;
          end else begin
            nrd   <= nrd + 1'b1;
            state <= M_RD_REQ;
          end
        end
        M_CALC: if (calc_done) state <= M_WR;
        M_WR: if (m_gnt) begin
          n_done <= n_done + 1;
          state  <= M_IDLE;
        end
        default: state <= M_IDLE;
      endcase
    end
  end
endmodule
