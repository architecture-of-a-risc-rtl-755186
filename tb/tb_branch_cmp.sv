// tb_branch_cmp: self-checking test of the branch comparator. Corner values
// (0, -1, most negative, most positive) are combined pairwise and then random
// pairs, half of them equal, are checked against Rs = Rt and a signed Rs < 0.
module tb_branch_cmp;
  logic        clk = 1'b0;
  int          checks = 0, failures = 0;
  logic [31:0] a, b;
  logic        eq, ltz;

  branch_cmp #(.W(32)) dut (.rs_val(a), .rt_val(b), .eq, .ltz);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] x, logic [31:0] y);
    a = x; b = y; #1;
    checks++;
    if (eq !== (x == y) || ltz !== ($signed(x) < 0)) begin
      failures++;
      $display("FAIL a=%h b=%h eq=%b ltz=%b", x, y, eq, ltz);
    end
  endtask

  initial begin
    logic [31:0] corner [5] = '{32'h0, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h1};
    logic [31:0] r;
    foreach (corner[i]) foreach (corner[j]) check(corner[i], corner[j]);
    repeat (2000) begin
      r = $urandom();
      if ($urandom_range(1)) check(r, r);
      else                   check(r, $urandom());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
