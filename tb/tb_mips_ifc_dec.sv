// tb_mips_ifc_dec: end-to-end test of the IFC/DEC front end at its default
// size (no parameter overrides).
//
// A random program of branches (all six conditions), J, Jal, Jr, Jalr, Eret
// and ALU instructions fills the whole instruction memory; the registers hold
// a small pool of negative, zero, positive and repeated values so that every
// branch goes both ways, plus word-aligned jump addresses. The run then goes
// on for many cycles with random exception requests, occasional resets,
// random Status bits 2 and 22 and random register writes.
//
// Every cycle the DUT's fetch address, instruction register and Soper/Toper
// are compared with a reference model of the architecture written from the
// instruction set: a branch or jump in DEC redirects the fetch that follows
// its delay slot (the next cycle, no stall), reset fetches 0xBFC0_0000, an
// exception fetches 0xBFC0_0380 or the exception address by Status(22) and
// discards the instruction being fetched. Each mechanism (each branch taken
// and not taken, J, Jr, Eret via Epc and via Eepc, both exception vectors,
// reset, sequential fetch) is counted, and one that never occurred counts
// as a failure.
module tb_mips_ifc_dec;
  import mips_pkg::*;

  localparam int unsigned DEPTH  = 1024;     // the top's default memory size
  localparam int unsigned CYCLES = 40000;

  typedef enum int {
    EV_SEQ, EV_BEQ_T, EV_BEQ_N, EV_BNE_T, EV_BNE_N, EV_BLTZ_T, EV_BLTZ_N,
    EV_BGEZ_T, EV_BGEZ_N, EV_BLEZ_T, EV_BLEZ_N, EV_BGTZ_T, EV_BGTZ_N,
    EV_J, EV_JR, EV_ERET_EPC, EV_ERET_EEPC, EV_EXC_BEX, EV_EXC_EXCA, EV_RESET,
    EV_NUM
  } event_e;

  logic        clk = 1'b0;
  int          checks = 0, failures = 0;
  int          cycle = 0;
  int          count [EV_NUM];

  logic        reset, exc_req, imem_we, rf_we;
  logic [31:0] status, epc, eepc, exc_addr, imem_waddr, imem_wdata, rf_wd;
  logic [4:0]  rf_wa;
  logic [31:0] pc, ir, nextpc, soper, toper;
  nextpc_sel_t sel;

  mips_ifc_dec dut (
    .clk, .reset, .exc_req, .status, .epc, .eepc, .exc_addr,
    .imem_we, .imem_waddr, .imem_wdata, .rf_we, .rf_wa, .rf_wd,
    .pc, .ir, .nextpc, .sel, .soper, .toper
  );

  always #5 clk = ~clk;

  initial begin
    repeat (CYCLES + DEPTH + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference state ----------------
  logic [31:0] prog [DEPTH];
  logic [31:0] regs [32];
  logic [31:0] r_pc, r_ir, r_soper, r_toper;

  function automatic logic [31:0] pool_value();
    logic [31:0] v [8] = '{32'd0, 32'd8, -32'd8, 32'd8, -32'd1, 32'h7FFF_FFF0, 32'h8000_0000, 32'd12};
    return v[$urandom_range(7)];
  endfunction

  function automatic logic [31:0] code_address();
    return 32'hBFC0_0000 + 32'(4 * $urandom_range(DEPTH - 1));
  endfunction

  function automatic logic [4:0] cmp_reg();   // registers holding pool values
    return 5'($urandom_range(0, 7));
  endfunction

  function automatic logic [31:0] random_instr();
    logic [4:0]  s = cmp_reg(), t = cmp_reg();
    logic [15:0] off = 16'($signed($urandom_range(0, 128)) - 64);
    int k = $urandom_range(99);
    if (k < 25) return {6'b000000, s, t, 5'($urandom()), 5'd0, 6'b100001};   // addu
    if (k < 33) return {6'b000100, s, t, off};                               // beq
    if (k < 41) return {6'b000101, s, t, off};                               // bne
    if (k < 49) return {6'b000001, s, 5'd0, off};                            // bltz
    if (k < 57) return {6'b000001, s, 5'd1, off};                            // bgez
    if (k < 65) return {6'b000110, s, 5'd0, off};                            // blez
    if (k < 73) return {6'b000111, s, 5'd0, off};                            // bgtz
    if (k < 79) return {6'b000010, 26'($urandom_range(0, 2**26 - 1))};       // j
    if (k < 82) return {6'b000011, 26'($urandom_range(0, 2**26 - 1))};       // jal
    if (k < 88) return {6'b000000, 5'($urandom_range(8, 15)), 15'd0, 6'b001000};        // jr
    if (k < 90) return {6'b000000, 5'($urandom_range(8, 15)), 5'd0, 5'd31, 5'd0, 6'b001001}; // jalr
    if (k < 95) return 32'h4200_0018;                                        // eret
    return {6'b001001, s, t, off};                                           // addiu
  endfunction

  // Next fetch address after the instruction `i` in DEC, fetch address `f`.
  function automatic logic [31:0] ref_next(logic [31:0] i, logic [31:0] f,
                                           logic [31:0] st, output event_e ev);
    logic [5:0]  op = i[31:26];
    logic signed [31:0] rs = regs[i[25:21]], rt = regs[i[20:16]];
    logic [31:0] bra = f + {{14{i[15]}}, i[15:0], 2'b00};
    logic [31:0] seq = f + 32'd4;
    bit taken;
    ev = EV_SEQ;
    case (op)
      6'b000100: begin taken = (rs == rt); ev = taken ? EV_BEQ_T : EV_BEQ_N; end
      6'b000101: begin taken = (rs != rt); ev = taken ? EV_BNE_T : EV_BNE_N; end
      6'b000110: begin taken = (rs <= 0);  ev = taken ? EV_BLEZ_T : EV_BLEZ_N; end
      6'b000111: begin taken = (rs >  0);  ev = taken ? EV_BGTZ_T : EV_BGTZ_N; end
      6'b000001: begin
        if (i[20:16] == 5'd0)      begin taken = (rs <  0); ev = taken ? EV_BLTZ_T : EV_BLTZ_N; end
        else if (i[20:16] == 5'd1) begin taken = (rs >= 0); ev = taken ? EV_BGEZ_T : EV_BGEZ_N; end
        else taken = 0;
      end
      6'b000010, 6'b000011: begin ev = EV_J; return {f[31:28], i[25:0], 2'b00}; end
      6'b000000: begin
        if (i[5:0] == 6'b001000 || i[5:0] == 6'b001001) begin ev = EV_JR; return rs; end
        taken = 0;
      end
      6'b010000: begin
        if (i[25] && i[5:0] == 6'b011000) begin
          ev = st[2] ? EV_ERET_EEPC : EV_ERET_EPC;
          return st[2] ? eepc : epc;
        end
        taken = 0;
      end
      default: taken = 0;
    endcase
    return taken ? bra : seq;
  endfunction

  task automatic compare(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d %s got %h expected %h", cycle, what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] n_pc, n_ir;
    event_e ev;
    bit run;

    reset = 1; exc_req = 0; status = 0; epc = 0; eepc = 0; exc_addr = 0;
    rf_we = 0; rf_wa = 0; rf_wd = 0; imem_we = 0; imem_waddr = 0; imem_wdata = 0;
    foreach (count[k]) count[k] = 0;

    // Load the program and the registers while reset is held.
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      prog[a] = random_instr();
      imem_we = 1; imem_waddr = 32'hBFC0_0000 + 32'(4 * a); imem_wdata = prog[a];
    end
    @(negedge clk); imem_we = 0;
    regs[0] = 0;
    for (int r = 1; r < 32; r++) begin
      @(negedge clk);
      rf_we = 1; rf_wa = 5'(r);
      rf_wd = (r < 8) ? pool_value() : code_address();
      regs[r] = rf_wd;
    end
    @(negedge clk); rf_we = 0;
    @(negedge clk);
    // Reset has been held for many edges: PC = RstA and I = NOP.
    r_pc = RST_ADDR; r_ir = NOP;
    compare("pc after reset", pc, r_pc);
    compare("ir after reset", ir, r_ir);
    reset = 0;
    run = 0;

    for (cycle = 0; cycle < CYCLES; cycle++) begin
      // this cycle's inputs (set at the falling edge)
      if (cycle > 0) begin
        reset   = ($urandom_range(999) == 0);
        exc_req = !reset && ($urandom_range(99) < 3);
        status  = $urandom();
        epc      = code_address();
        eepc     = code_address();
        exc_addr = code_address();
        rf_we = ($urandom_range(9) == 0);
        rf_wa = 5'($urandom_range(1, 15));
        rf_wd = (rf_wa < 8) ? pool_value() : code_address();
      end
      #1;
      compare("pc", pc, r_pc);
      compare("ir", ir, r_ir);
      if (run) begin
        compare("soper", soper, r_soper);
        compare("toper", toper, r_toper);
      end
      compare("nextpc", nextpc, reset ? RST_ADDR :
                                exc_req ? (status[22] ? BEX_ADDR : exc_addr) :
                                ref_next(r_ir, r_pc, status, ev));
      // reference step
      if (reset) begin
        n_pc = RST_ADDR; n_ir = NOP; ev = EV_RESET;
      end else if (exc_req) begin
        n_pc = status[22] ? BEX_ADDR : exc_addr; n_ir = NOP;
        ev = status[22] ? EV_EXC_BEX : EV_EXC_EXCA;
      end else begin
        n_pc = ref_next(r_ir, r_pc, status, ev);
        n_ir = prog[r_pc[11:2]];
      end
      count[ev]++;
      r_soper = regs[r_ir[25:21]];
      r_toper = regs[r_ir[20:16]];
      run = 1;
      @(posedge clk);
      if (rf_we) regs[rf_wa] = rf_wd;
      r_pc = n_pc; r_ir = n_ir;
      @(negedge clk);
    end

    for (int k = 0; k < EV_NUM; k++) begin
      checks++;
      $display("  %-14s %0d", event_e'(k), count[k]);
      if (count[k] == 0) begin
        failures++;
        $display("FAIL mechanism %s never occurred", event_e'(k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
