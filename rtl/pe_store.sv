// pe_store: one local store of a vector processor (the "Store" boxes of the
// processor diagram). A simple dual-port RAM of masked pixels: one write port
// and one read port, both synchronous, as an FPGA block RAM provides.
//
// Timing: the read data for rd_addr presented in cycle t is on rd_data in
// cycle t+1. A write in cycle t is visible to reads issued from cycle t+1; a
// read of the address being written in the same cycle returns the old word.
// The store's depth is this design's choice (1024 words of 16+1 bits, one
// 1024x18 block RAM); the source design only names the store.
module pe_store
  import vcp_pkg::*;
#(
  parameter int AW = STORE_AW
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] wr_addr,
  input  mpix_t         wr_data,
  input  logic [AW-1:0] rd_addr,
  output mpix_t         rd_data
);
  mpix_t mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end
endmodule
