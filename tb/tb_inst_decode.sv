// tb_inst_decode: self-checking test of the control-flow decoder. Each
// instruction kind is assembled from its MIPS32 fields with random register
// numbers and immediates, and the class and the extracted fields are
// compared with what was assembled. Near misses (other REGIMM, SPECIAL and
// COP0 codes, ALU opcodes) must decode as sequential.
module tb_inst_decode;
  import mips_pkg::*;

  logic        clk = 1'b0;
  int          checks = 0, failures = 0;
  logic [31:0] ir;
  cflow_e      cflow;
  logic [4:0]  rs, rt;
  logic [15:0] imm16;
  logic [25:0] target26;

  inst_decode dut (.ir, .cflow, .rs, .rt, .imm16, .target26);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] i, cflow_e exp);
    ir = i; #1;
    checks++;
    if (cflow != exp || rs != i[25:21] || rt != i[20:16] || imm16 != i[15:0] || target26 != i[25:0]) begin
      failures++;
      $display("FAIL ir=%h class=%s expected %s", i, cflow.name(), exp.name());
    end
  endtask

  function automatic logic [31:0] itype(logic [5:0] op, logic [4:0] s, logic [4:0] t, logic [15:0] imm);
    return {op, s, t, imm};
  endfunction

  initial begin
    logic [4:0] s, t;
    logic [15:0] imm;
    repeat (200) begin
      s = 5'($urandom()); t = 5'($urandom()); imm = 16'($urandom());
      check(itype(6'b000100, s, t, imm), CF_BEQ);
      check(itype(6'b000101, s, t, imm), CF_BNE);
      check(itype(6'b000110, s, 5'd0, imm), CF_BLEZ);
      check(itype(6'b000111, s, 5'd0, imm), CF_BGTZ);
      check(itype(6'b000001, s, 5'd0, imm), CF_BLTZ);
      check(itype(6'b000001, s, 5'd1, imm), CF_BGEZ);
      check(itype(6'b000001, s, 5'd2 + 5'($urandom_range(0, 29)), imm), CF_SEQ);
      check({6'b000010, 26'($urandom())}, CF_J);
      check({6'b000011, 26'($urandom())}, CF_J);
      check({6'b000000, s, 15'd0, 6'b001000}, CF_JR);
      check({6'b000000, s, 5'd0, 5'd31, 5'd0, 6'b001001}, CF_JR);
      check({6'b000000, s, t, 5'($urandom()), 5'd0, 6'b100001}, CF_SEQ);   // addu
      check(itype(6'b001001, s, t, imm), CF_SEQ);                          // addiu
      check(itype(6'b100011, s, t, imm), CF_SEQ);                          // lw
    end
    check(32'h4200_0018, CF_ERET);
    check(32'h4080_6000, CF_SEQ);   // mtc0
    check(32'h4000_6018, CF_SEQ);   // mfc0 form with eret's function code
    check(32'h0000_0000, CF_SEQ);   // nop
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
