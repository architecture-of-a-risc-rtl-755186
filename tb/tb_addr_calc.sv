// tb_addr_calc: self-checking test of the address adders. Random PC values,
// immediates (forced positive, negative and extreme in turn) and jump targets
// are applied; SeqA, BraA and JmpA are compared with integer arithmetic on
// the PC: PC + 4, PC + 4 * signed(imm) and (PC & 0xF000_0000) | target * 4.
module tb_addr_calc;
  logic        clk = 1'b0;
  int          checks = 0, failures = 0;
  logic [31:0] pc, seqa, braa, jmpa;
  logic [15:0] imm16;
  logic [25:0] target26;

  addr_calc #(.W(32)) dut (.pc, .imm16, .target26, .seqa, .braa, .jmpa);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint signed off;
    logic [31:0] exp_b;
    for (int n = 0; n < 3000; n++) begin
      pc       = {$urandom()} & 32'hFFFF_FFFC;
      target26 = 26'($urandom());
      case (n % 4)
        0: imm16 = 16'($urandom_range(0, 32767));
        1: imm16 = 16'(-$urandom_range(1, 32768));
        2: imm16 = 16'h8000;
        default: imm16 = 16'h7FFF;
      endcase
      #1;
      off   = longint'($signed(imm16)) * 4;
      exp_b = 32'(longint'(pc) + off);
      checks += 3;
      if (seqa !== pc + 32'd4) begin failures++; $display("FAIL seqa pc=%h got %h", pc, seqa); end
      if (braa !== exp_b)      begin failures++; $display("FAIL braa pc=%h imm=%h got %h exp %h", pc, imm16, braa, exp_b); end
      if (jmpa !== ((pc & 32'hF000_0000) | (32'(target26) * 4)))
                               begin failures++; $display("FAIL jmpa pc=%h t=%h got %h", pc, target26, jmpa); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
