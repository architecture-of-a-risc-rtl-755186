// nextpc_mux: the next-instruction-address multiplexer tree of the DEC stage.
//
// Nine candidate addresses are reduced to NextPc by ten 2:1 multiplexers whose
// selects are C0..C9. The tree is ordered by arrival time rather than by
// command priority: the slow constant/system sources (Eepc, Epc, JmpA, SeqA,
// BexA, ExcA, RstA) are merged first, the branch target BraA and the register
// jump address Rs, which arrive last, are merged next to the output, and the
// final select C0 is the late comparator result Rs = Rt. C1 and C2 feed the
// same two sub-results into C0 in opposite order, so the complemented branch
// conditions (Bne, Bgez, Bgtz) need no inverted comparator output.
//
// Topology (sel = 1 picks the first-named input):
//   m7 = C7 ? Eepc : Epc        m6 = C6 ? m7   : JmpA    m5 = C5 ? m6 : SeqA
//   m9 = C9 ? BexA : ExcA       m8 = C8 ? RstA : m9      m4 = C4 ? m5 : m8
//   m3 = C3 ? BraA : Rs         m1 = C1 ? m3   : m4      m2 = C2 ? m4 : m3
//   NextPc = C0 ? m1 : m2
// The tree and the meaning of each select follow the design; for C8 the select
// polarity is taken from its definition (C8 = Reset picks RstA).
// Purely combinational, no clock.
module nextpc_mux
  import mips_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  nextpc_sel_t  sel,
  input  logic [W-1:0] seqa,
  input  logic [W-1:0] braa,
  input  logic [W-1:0] jmpa,
  input  logic [W-1:0] rs,
  input  logic [W-1:0] rsta,
  input  logic [W-1:0] bexa,
  input  logic [W-1:0] exca,
  input  logic [W-1:0] epc,
  input  logic [W-1:0] eepc,
  output logic [W-1:0] nextpc
);
  logic [W-1:0] m1, m2, m3, m4, m5, m6, m7, m8, m9;

  mux2 #(.W(W)) u_c7 (.sel(sel.c7), .in1(eepc), .in0(epc),  .y(m7));
  mux2 #(.W(W)) u_c6 (.sel(sel.c6), .in1(m7),   .in0(jmpa), .y(m6));
  mux2 #(.W(W)) u_c5 (.sel(sel.c5), .in1(m6),   .in0(seqa), .y(m5));
  mux2 #(.W(W)) u_c9 (.sel(sel.c9), .in1(bexa), .in0(exca), .y(m9));
  mux2 #(.W(W)) u_c8 (.sel(sel.c8), .in1(rsta), .in0(m9),   .y(m8));
  mux2 #(.W(W)) u_c4 (.sel(sel.c4), .in1(m5),   .in0(m8),   .y(m4));
  mux2 #(.W(W)) u_c3 (.sel(sel.c3), .in1(braa), .in0(rs),   .y(m3));
  mux2 #(.W(W)) u_c1 (.sel(sel.c1), .in1(m3),   .in0(m4),   .y(m1));
  mux2 #(.W(W)) u_c2 (.sel(sel.c2), .in1(m4),   .in0(m3),   .y(m2));
  mux2 #(.W(W)) u_c0 (.sel(sel.c0), .in1(m1),   .in0(m2),   .y(nextpc));
endmodule
