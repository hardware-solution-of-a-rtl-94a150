// index_fifo -- one of the FIFO buffers between the Point Generator and the
// Point Distributor.  The platform has one such buffer per index dimension;
// all of them are written and read together, so that entry n of every buffer
// belongs to the same point.
//
// A plain synchronous FIFO: a circular array of DEPTH words with a read and a
// write pointer and an occupancy count.  push is ignored when full, pop when
// empty; push and pop may occur in the same cycle.  rdata shows the oldest
// entry while !empty (first-word fall-through), so a pop consumes the value
// visible in that cycle.  The source design states only that the buffers
// exist and what they hold; depth, handshake and reset are choices here.
module index_fifo #(
  parameter int unsigned W     = dioph_pkg::IW_DEF,
  parameter int unsigned DEPTH = dioph_pkg::FDEPTH_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] wdata,
  input  logic         pop,
  output logic [W-1:0] rdata,
  output logic         full,
  output logic         empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] wp, rp;
  logic          do_push, do_pop;

  assign full    = (32'(count) == DEPTH);
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rdata   = mem[rp];

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= inc(wp);
      if (do_pop)  rp <= inc(rp);
      if (do_push && !do_pop)      count <= count + 1'b1;
      else if (do_pop && !do_push) count <= count - 1'b1;
    end
  end
endmodule
