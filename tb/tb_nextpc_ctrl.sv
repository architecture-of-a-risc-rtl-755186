// tb_nextpc_ctrl: self-checking test of the select generator.
// For every control-flow class, every reachable comparator outcome, reset,
// exception request and both Status bits, the selects are pushed through a
// model of the multiplexer tree that returns a source name, and that name is
// compared with the architectural next address: reset -> RstA, exception ->
// BexA or ExcA by Status(22), Eret -> Eepc or Epc by Status(2), J -> JmpA,
// Jr -> Rs, a taken branch -> BraA, otherwise SeqA. Branch outcomes come from
// the signed value of Rs; C3..C9 are also checked against their definitions.
module tb_nextpc_ctrl;
  import mips_pkg::*;

  typedef enum int {S_SEQ, S_BRA, S_JMP, S_RS, S_RST, S_BEX, S_EXC, S_EPC, S_EEPC} src_e;

  logic        clk = 1'b0;
  int          checks = 0, failures = 0;

  cflow_e      cflow;
  logic        eq, ltz, reset, exc_req, xr;
  logic [31:0] status;
  nextpc_sel_t sel;

  nextpc_ctrl dut (.cflow, .eq, .ltz, .reset, .exc_req, .status, .sel, .xr);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic src_e tree(nextpc_sel_t s);
    src_e m3, m4;
    m3 = s.c3 ? S_BRA : S_RS;
    if (s.c4)      m4 = !s.c5 ? S_SEQ : (!s.c6 ? S_JMP : (s.c7 ? S_EEPC : S_EPC));
    else if (s.c8) m4 = S_RST;
    else           m4 = s.c9 ? S_BEX : S_EXC;
    if (s.c0) return s.c1 ? m3 : m4;
    else      return s.c2 ? m4 : m3;
  endfunction

  // rs, rt: signed register values; for Blez/Bgtz rt is R0 = 0.
  function automatic src_e golden(cflow_e c, int rs, int rt, bit rst, bit exc, bit erl, bit bev);
    if (rst) return S_RST;
    if (exc) return bev ? S_BEX : S_EXC;
    case (c)
      CF_BEQ:  return (rs == rt) ? S_BRA : S_SEQ;
      CF_BNE:  return (rs != rt) ? S_BRA : S_SEQ;
      CF_BLTZ: return (rs <  0)  ? S_BRA : S_SEQ;
      CF_BGEZ: return (rs >= 0)  ? S_BRA : S_SEQ;
      CF_BLEZ: return (rs <= 0)  ? S_BRA : S_SEQ;
      CF_BGTZ: return (rs >  0)  ? S_BRA : S_SEQ;
      CF_J:    return S_JMP;
      CF_JR:   return S_RS;
      CF_ERET: return erl ? S_EEPC : S_EPC;
      default: return S_SEQ;
    endcase
  endfunction

  initial begin
    int vals [5] = '{0, 5, -5, 7, -7};
    int rt;
    src_e g, t;
    for (int c = 0; c <= 9; c++)
      foreach (vals[i]) foreach (vals[k])
        for (int m = 0; m < 16; m++) begin
          cflow   = cflow_e'(c);
          rt      = (cflow == CF_BLEZ || cflow == CF_BGTZ) ? 0 : vals[k];
          eq      = (vals[i] == rt);
          ltz     = (vals[i] < 0);
          reset   = m[0];
          exc_req = m[1];
          status  = $urandom();
          status[STATUS_ERL] = m[2];
          status[STATUS_BEV] = m[3];
          #1;
          g = golden(cflow, vals[i], rt, m[0], m[1], m[2], m[3]);
          t = tree(sel);
          checks++;
          if (t != g) begin
            failures++;
            $display("FAIL class=%s rs=%0d rt=%0d m=%b tree=%s golden=%s sel=%b",
                     cflow.name(), vals[i], rt, m, t.name(), g.name(), sel);
          end
          checks++;
          if (sel.c3 != (c >= 1 && c <= 6) || sel.c4 != !(m[0] | m[1]) ||
              sel.c5 != (cflow == CF_J || cflow == CF_ERET) || sel.c6 != (cflow == CF_ERET) ||
              sel.c7 != m[2] || sel.c8 != m[0] || sel.c9 != m[3] || sel.c0 != eq ||
              xr != (m[0] | m[1])) begin
            failures++;
            $display("FAIL direct selects class=%s m=%b sel=%b", cflow.name(), m, sel);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
