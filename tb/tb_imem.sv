// tb_imem: self-checking test of the instruction memory. A random program is
// loaded through the write port at the reset address region and read back
// through the fetch port at every word, from both the 0xBFC0_0000 alias and
// address 0, and compared with the values written.
module tb_imem;
  localparam int unsigned DEPTH = 256;
  logic        clk = 1'b0;
  int          checks = 0, failures = 0;
  logic [31:0] addr, rdata, waddr, wdata;
  logic        we;
  logic [31:0] shadow [DEPTH];

  imem #(.DEPTH(DEPTH)) dut (.clk, .addr, .rdata, .we, .waddr, .wdata);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 32'hBFC0_0000 + 32'(4 * i); wdata = $urandom(); shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      addr = 32'hBFC0_0000 + 32'(4 * i); #1;
      checks++;
      if (rdata !== shadow[i]) begin failures++; $display("FAIL word %0d got %h exp %h", i, rdata, shadow[i]); end
      addr = 32'(4 * i); #1;
      checks++;
      if (rdata !== shadow[i]) begin failures++; $display("FAIL alias word %0d got %h", i, rdata); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
