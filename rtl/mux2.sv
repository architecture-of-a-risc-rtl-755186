// mux2: two-input word multiplexer, the cell the next-address tree is built
// from. sel = 1 passes in1 (drawn as the upper input), sel = 0 passes in0.
// Purely combinational.
module mux2 #(
  parameter int unsigned W = 32
) (
  input  logic         sel,
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in0,
  output logic [W-1:0] y
);
  assign y = sel ? in1 : in0;
endmodule
