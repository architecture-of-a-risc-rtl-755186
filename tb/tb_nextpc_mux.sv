// tb_nextpc_mux: self-checking test of the next-address multiplexer tree.
// Every one of the 1024 select combinations is applied with fresh random
// source addresses, and NextPc is compared with the source that the path
// through the tree (C0 -> C1/C2 -> C3/C4 -> ...) names, worked out here by
// following the selects one level at a time.
module tb_nextpc_mux;
  import mips_pkg::*;

  logic        clk = 1'b0;
  int unsigned cycles = 0;
  int          checks = 0, failures = 0;

  nextpc_sel_t sel;
  logic [31:0] src [9];  // 0 SeqA 1 BraA 2 JmpA 3 Rs 4 RstA 5 BexA 6 ExcA 7 Epc 8 Eepc
  logic [31:0] nextpc;

  nextpc_mux #(.W(32)) dut (
    .sel, .seqa(src[0]), .braa(src[1]), .jmpa(src[2]), .rs(src[3]),
    .rsta(src[4]), .bexa(src[5]), .exca(src[6]), .epc(src[7]), .eepc(src[8]),
    .nextpc
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Which source the selects route to NextPc.
  function automatic int expected_src(nextpc_sel_t s);
    bit branch_side;   // 1: the BraA/Rs group, 0: the C4 group
    if (s.c0) branch_side = s.c1;
    else      branch_side = !s.c2;
    if (branch_side) return s.c3 ? 1 : 3;
    if (s.c4) begin
      if (!s.c5) return 0;
      if (!s.c6) return 2;
      return s.c7 ? 8 : 7;
    end
    if (s.c8) return 4;
    return s.c9 ? 5 : 6;
  endfunction

  initial begin
    int e;
    for (int n = 0; n < 1024; n++) begin
      sel = nextpc_sel_t'(n);
      for (int k = 0; k < 9; k++) src[k] = $urandom();
      #1;
      e = expected_src(sel);
      checks++;
      if (nextpc !== src[e]) begin
        failures++;
        $display("FAIL sel=%b expected src %0d %h got %h", sel, e, src[e], nextpc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
