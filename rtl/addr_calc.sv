// addr_calc: the DEC-stage address adders.
//
// Two adders work side by side from the PC register: one adds 4 (SeqA), the
// other adds the sign-extended 16-bit immediate times 4 (BraA). Using two
// adders instead of one adder behind a 4 / Ix4 multiplexer takes the mux off
// the adder's input, so the add overlaps the operand read and compare and only
// the final next-address mux follows it. JmpA keeps the top four PC bits and
// appends the 26-bit target times 4 (MIPS J format, this design's choice).
// pc is the address of the instruction being fetched while the branch or jump
// is decoded (its delay slot), so SeqA is the address after the delay slot.
// Combinational.
module addr_calc #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] pc,
  input  logic [15:0]  imm16,
  input  logic [25:0]  target26,
  output logic [W-1:0] seqa,
  output logic [W-1:0] braa,
  output logic [W-1:0] jmpa
);
  logic [W-1:0] offset;

  always_comb begin
    offset = {{(W-16){imm16[15]}}, imm16} << 2;
    seqa   = pc + W'(4);
    braa   = pc + offset;
    jmpa   = {pc[W-1:28], target26, 2'b00};
  end
endmodule
