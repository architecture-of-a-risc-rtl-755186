// branch_cmp: the DEC-stage branch comparator.
//
// From the two operands just read from the register file it produces the only
// two conditions the next-address logic needs: Rs = Rt (eq) and Rs < 0 (ltz,
// the sign bit). Every conditional branch is expressed with these two: Bne,
// Bgez and Bgtz use them complemented, and Blez/Bgtz compare Rs against R0.
// Combinational; it runs in parallel with the address adders.
module branch_cmp #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] rs_val,
  input  logic [W-1:0] rt_val,
  output logic         eq,
  output logic         ltz
);
  assign eq  = (rs_val == rt_val);
  assign ltz = rs_val[W-1];
endmodule
