// mips_pkg: types and constants shared by the IFC/DEC front end.
//
// The two fixed addresses are those of the design: RST_ADDR is where the
// processor starts after reset (RstA) and BEX_ADDR is the bootstrap exception
// vector (BexA) used while Status bit 22 is set. The 32-bit word, the MIPS32
// opcode values and the control-flow class enum are this design's choice.
package mips_pkg;

  localparam logic [31:0] RST_ADDR = 32'hBFC0_0000;  // RstA
  localparam logic [31:0] BEX_ADDR = 32'hBFC0_0380;  // BexA

  localparam logic [31:0] NOP = 32'h0000_0000;       // sll r0,r0,0

  // Status register bits that steer the next-address tree.
  localparam int unsigned STATUS_ERL = 2;   // C7: return through Eepc
  localparam int unsigned STATUS_BEV = 22;  // C9: bootstrap exception vector

  // Primary opcodes (instruction bits 31:26).
  localparam logic [5:0] OP_SPECIAL = 6'b000000;
  localparam logic [5:0] OP_REGIMM  = 6'b000001;
  localparam logic [5:0] OP_J       = 6'b000010;
  localparam logic [5:0] OP_JAL     = 6'b000011;
  localparam logic [5:0] OP_BEQ     = 6'b000100;
  localparam logic [5:0] OP_BNE     = 6'b000101;
  localparam logic [5:0] OP_BLEZ    = 6'b000110;
  localparam logic [5:0] OP_BGTZ    = 6'b000111;
  localparam logic [5:0] OP_COP0    = 6'b010000;

  // Function codes (bits 5:0) and REGIMM rt codes (bits 20:16).
  localparam logic [5:0] FN_JR      = 6'b001000;
  localparam logic [5:0] FN_JALR    = 6'b001001;
  localparam logic [5:0] FN_ERET    = 6'b011000;
  localparam logic [4:0] RT_BLTZ    = 5'b00000;
  localparam logic [4:0] RT_BGEZ    = 5'b00001;

  // Control-flow class of the instruction in DEC, as seen by the
  // next-address logic. SEQ is every instruction that falls through.
  typedef enum logic [3:0] {
    CF_SEQ  = 4'd0,
    CF_BEQ  = 4'd1,
    CF_BNE  = 4'd2,
    CF_BLTZ = 4'd3,
    CF_BGEZ = 4'd4,
    CF_BLEZ = 4'd5,
    CF_BGTZ = 4'd6,
    CF_J    = 4'd7,
    CF_JR   = 4'd8,
    CF_ERET = 4'd9
  } cflow_e;

  // Select lines of the next-address multiplexer tree.
  typedef struct packed {
    logic c9, c8, c7, c6, c5, c4, c3, c2, c1, c0;
  } nextpc_sel_t;

endpackage
