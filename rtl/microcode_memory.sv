// microcode_memory: the microcode store read by the VLIW controller. It is
// built as FPGA block RAM so that its contents can be replaced without
// rebuilding the rest of the design.
//
// Port "load" writes one word per cycle (used by whatever loads the
// microcode: a bitstream update in the original system, a host interface
// here). Port "rd" is a synchronous read: the word at rd_addr in cycle t is on
// rd_data in cycle t+1. The controller uses that output register as its
// instruction register. Depth (1024 words) and the load port are this design's
// choices. The source design gives the use of block RAM and a bus over 100
// bits wide; this design's word is 95 bits (UINSTR_W) because its processors
// have fewer controls.
module microcode_memory
  import vcp_pkg::*;
#(
  parameter int AW = UC_AW,
  parameter int W  = UINSTR_W
) (
  input  logic          clk,
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,
  input  logic [W-1:0]  load_data,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data
);
  logic [W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
    rd_data <= mem[rd_addr];
  end
endmodule
