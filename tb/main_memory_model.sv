// main_memory_model -- behavioural model of the platform's main memory, for
// simulation only.
//
// A word-addressed array of 2^AW words of DW bits.  It accepts one request
// per cycle (mem_req with mem_we/mem_addr/mem_wdata); a write updates the
// word at the clock edge, a read returns the word on mem_rdata in the
// following cycle.  Testbenches reach the array directly (mem) to load
// initial data and to read back results.
module main_memory_model #(
  parameter int unsigned AW = 16,
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          mem_req,
  input  logic          mem_we,
  input  logic [AW-1:0] mem_addr,
  input  logic [DW-1:0] mem_wdata,
  output logic [DW-1:0] mem_rdata
);
  logic [DW-1:0] mem [2**AW];

  initial for (int i = 0; i < 2**AW; i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (mem_req) begin
      if (mem_we) mem[mem_addr] <= mem_wdata;
      else        mem_rdata     <= mem[mem_addr];
    end
  end
endmodule
