// inst_decode: control-flow decoder for the instruction register.
//
// Classifies the instruction held in I for the next-address logic (Beq, Bne,
// Bltz, Bgez, Blez, Bgtz, J, Jr, Eret, or sequential) and splits out the
// fields the DEC stage uses: Rs and Rt register numbers, the 16-bit
// immediate and the 26-bit jump target. Encodings are MIPS32 (this design's
// choice). Jal and Jalr are classed with J and Jr, since their next address
// is the same; Blez and Bgtz are expected to carry Rt = 0, and Bltz/Bgez are
// REGIMM with Rt = 0 / 1. Anything else falls through (sequential).
// Combinational.
module inst_decode
  import mips_pkg::*;
(
  input  logic [31:0] ir,
  output cflow_e      cflow,
  output logic [4:0]  rs,
  output logic [4:0]  rt,
  output logic [15:0] imm16,
  output logic [25:0] target26
);
  logic [5:0] op, fn;

  always_comb begin
    op       = ir[31:26];
    fn       = ir[5:0];
    rs       = ir[25:21];
    rt       = ir[20:16];
    imm16    = ir[15:0];
    target26 = ir[25:0];

    unique case (op)
      OP_BEQ:  cflow = CF_BEQ;
      OP_BNE:  cflow = CF_BNE;
      OP_BLEZ: cflow = CF_BLEZ;
      OP_BGTZ: cflow = CF_BGTZ;
      OP_J, OP_JAL: cflow = CF_J;
      OP_REGIMM:
        if      (rt == RT_BLTZ) cflow = CF_BLTZ;
        else if (rt == RT_BGEZ) cflow = CF_BGEZ;
        else                    cflow = CF_SEQ;
      OP_SPECIAL:
        if (fn == FN_JR || fn == FN_JALR) cflow = CF_JR;
        else                              cflow = CF_SEQ;
      OP_COP0:
        if (ir[25] && fn == FN_ERET) cflow = CF_ERET;
        else                         cflow = CF_SEQ;
      default: cflow = CF_SEQ;
    endcase
  end
endmodule
