// calculations -- the loop-body unit of a processing element.
//
// It evaluates the statement of the example loop nest
//     a(I1, I2) = a(I1-1, I2) + a(I1, I2-1) + a(I1-1, I2-1)
// on the three operands fetched by the Memory Access Unit: start with the
// operands in op, and one cycle later done pulses with the sum in result
// (modulo 2^DW).  The statement is the source design's example; the
// start/done handshake and the one-cycle latency are choices here.  A
// different loop body replaces this module and keeps its interface.
module calculations #(
  parameter int unsigned DW = dioph_pkg::DW_DEF
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [2:0][DW-1:0] op,
  output logic               done,
  output logic [DW-1:0]      result
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      done   <= 1'b0;
      result <= '0;
    end else begin
      done <= start;
      if (start) result <= op[0] + op[1] + op[2];
    end
  end
endmodule
