// tb_regfile: self-checking test of the register file. All registers are
// written with random values, then random writes and reads are interleaved
// and both read ports are compared with a shadow array every cycle; writes
// to register 0 must leave it reading zero. A write is visible on the cycle
// after its clock edge.
module tb_regfile;
  logic        clk = 1'b0;
  int          checks = 0, failures = 0;
  logic [4:0]  ra_s, ra_t, wa;
  logic [31:0] rd_s, rd_t, wd;
  logic        we;
  logic [31:0] shadow [32];

  regfile #(.W(32), .NREGS(32)) dut (.clk, .ra_s, .ra_t, .rd_s, .rd_t, .we, .wa, .wd);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wa = 0; wd = 0; ra_s = 0; ra_t = 0;
    shadow[0] = 0;
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      we = 1; wa = 5'(r); wd = $urandom();
      if (r != 0) shadow[r] = wd;
    end
    @(negedge clk); we = 0;
    repeat (3000) begin
      @(negedge clk);
      ra_s = 5'($urandom()); ra_t = 5'($urandom());
      #1;
      checks += 2;
      if (rd_s !== shadow[ra_s]) begin failures++; $display("FAIL rs r%0d got %h exp %h", ra_s, rd_s, shadow[ra_s]); end
      if (rd_t !== shadow[ra_t]) begin failures++; $display("FAIL rt r%0d got %h exp %h", ra_t, rd_t, shadow[ra_t]); end
      we = $urandom_range(1); wa = ($urandom_range(7) == 0) ? 5'd0 : 5'($urandom()); wd = $urandom();
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
