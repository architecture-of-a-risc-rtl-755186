// imem: instruction memory M, read during the IFC cycle.
//
// DEPTH words of 32 bits. The read is combinational from the byte address
// in the PC register; the word it returns is captured by the instruction
// register I at the end of IFC. Only the low address bits index the array,
// so the memory aliases across the address space (the reset address
// 0xBFC0_0000 maps to word 0). A synchronous write port loads the program.
// Depth and loading are this design's choice.
module imem #(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic [31:0] addr,
  output logic [31:0] rdata,
  input  logic        we,
  input  logic [31:0] waddr,
  input  logic [31:0] wdata
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr[AW+1:2]] <= wdata;

  assign rdata = mem[addr[AW+1:2]];
endmodule
