// nextpc_ctrl: select generation for the next-address multiplexer tree.
//
// Inputs are the control-flow class of the instruction in DEC, the two
// comparator outputs (Rs = Rt, Rs < 0), the Reset and exception requests and
// Status bits 2 (ERL) and 22 (BEV). XR is "reset or exception"; it overrides
// the instruction. The equations follow the design:
//   C0 = (Rs = Rt)                     C3 = any conditional branch
//   C4 = not XR                        C5 = Eret + J      C6 = Eret
//   C7 = Status(2)                     C8 = Reset         C9 = Status(22)
//   C1 = picks the BraA/Rs side when C0 = 1, C2 picks it when C0 = 0:
//   Beq  C1=1,  C2=1      Bne  C1=0,    C2=0
//   Bltz C1=lt, C2=~lt    Bgez C1=~lt,  C2=lt
//   Blez C1=1,  C2=~lt    Bgtz C1=0,    C2=lt
//   Jr   C1=1,  C2=0      J, Eret, sequential, XR: C1=0, C2=1
// Blez and Bgtz rely on their Rt field being 0, so Rs = Rt means Rs = 0.
// The Blez column of C1 (constant 1) is this design's resolution of the
// case C0 = 1, where Rs = 0 and the branch is taken.
// Purely combinational.
module nextpc_ctrl
  import mips_pkg::*;
(
  input  cflow_e      cflow,
  input  logic        eq,          // Rs = Rt
  input  logic        ltz,         // Rs < 0
  input  logic        reset,
  input  logic        exc_req,
  input  logic [31:0] status,
  output nextpc_sel_t sel,
  output logic        xr           // reset or exception: DEC result discarded
);
  logic beq, bne, bltz, bgez, blez, bgtz, j, jr, eret, seq;

  always_comb begin
    beq  = (cflow == CF_BEQ);
    bne  = (cflow == CF_BNE);
    bltz = (cflow == CF_BLTZ);
    bgez = (cflow == CF_BGEZ);
    blez = (cflow == CF_BLEZ);
    bgtz = (cflow == CF_BGTZ);
    j    = (cflow == CF_J);
    jr   = (cflow == CF_JR);
    eret = (cflow == CF_ERET);
    seq  = (cflow == CF_SEQ);

    xr = reset | exc_req;

    sel.c0 = eq;
    sel.c1 = ~xr & (beq | jr | blez | (bltz & ltz) | (bgez & ~ltz));
    sel.c2 = xr | beq | j | eret | seq
           | ((bltz | blez) & ~ltz) | ((bgez | bgtz) & ltz);
    sel.c3 = beq | bne | bltz | bgez | blez | bgtz;
    sel.c4 = ~xr;
    sel.c5 = eret | j;
    sel.c6 = eret;
    sel.c7 = status[STATUS_ERL];
    sel.c8 = reset;
    sel.c9 = status[STATUS_BEV];
  end
endmodule
