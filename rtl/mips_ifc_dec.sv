// mips_ifc_dec: instruction fetch (IFC) and decode (DEC) stages of a pipelined
// MIPS, built around a next-instruction-address unit tuned for delay.
//
// IFC: the PC register addresses the instruction memory M; the word read is
// captured by the instruction register I.
// DEC: the instruction in I is decoded; its Rs and Rt operands are read from
// the register file and captured in Soper and Toper for the execute stage.
// In the same cycle the next fetch address is computed: the comparator
// (Rs = Rt, Rs < 0), the +4 adder (SeqA) and the +Ix4 adder (BraA) run in
// parallel, and the multiplexer tree picks NextPc among SeqA, BraA, JmpA,
// Rs, Epc, Eepc, ExcA, BexA and RstA. NextPc is loaded into the PC register
// at the next rising edge, so a branch or jump takes effect after exactly one
// delay-slot instruction and the fetch stream never stalls.
//
// Priority: Reset > exception > instruction. reset is synchronous: while it
// is high NextPc is RstA (0xBFC0_0000); while exc_req is high NextPc is BexA
// (0xBFC0_0380) if Status bit 22 is set, else exc_addr. Eret returns to Eepc
// if Status bit 2 is set, else to Epc. Reset and exceptions also load a NOP
// into I so the instruction being fetched is discarded (this design's choice).
//
// Epc, Eepc, the exception address and Status belong to the system
// coprocessor, and the register write port and exc_req to the later stages;
// all of these are ports. The single PC register used by both the memory and
// the adders, the NOP flush and the port list are this design's choices.
module mips_ifc_dec
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 1024
) (
  input  logic        clk,
  input  logic        reset,
  // exception request and system coprocessor state
  input  logic        exc_req,
  input  logic [31:0] status,
  input  logic [31:0] epc,
  input  logic [31:0] eepc,
  input  logic [31:0] exc_addr,     // ExcA, the exception base register
  // instruction memory load port
  input  logic        imem_we,
  input  logic [31:0] imem_waddr,
  input  logic [31:0] imem_wdata,
  // register write-back port
  input  logic        rf_we,
  input  logic [4:0]  rf_wa,
  input  logic [31:0] rf_wd,
  // stage state
  output logic [31:0] pc,           // address being fetched (IFC)
  output logic [31:0] ir,           // instruction in DEC
  output logic [31:0] nextpc,       // address of the next fetch
  output nextpc_sel_t sel,          // C0..C9, for observation
  output logic [31:0] soper,        // Rs operand for EXE
  output logic [31:0] toper         // Rt operand for EXE
);
  logic [31:0] imem_rdata;
  cflow_e      cflow;
  logic [4:0]  rs_n, rt_n;
  logic [15:0] imm16;
  logic [25:0] target26;
  logic [31:0] rs_val, rt_val;
  logic        eq, ltz, xr;
  logic [31:0] seqa, braa, jmpa;

  // ---------------- IFC ----------------
  imem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk, .addr(pc), .rdata(imem_rdata),
    .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata)
  );

  always_ff @(posedge clk) begin
    pc <= nextpc;
    ir <= xr ? NOP : imem_rdata;
  end

  // ---------------- DEC ----------------
  inst_decode u_dec (
    .ir, .cflow, .rs(rs_n), .rt(rt_n), .imm16, .target26
  );

  regfile #(.W(32), .NREGS(32)) u_rf (
    .clk, .ra_s(rs_n), .ra_t(rt_n), .rd_s(rs_val), .rd_t(rt_val),
    .we(rf_we), .wa(rf_wa), .wd(rf_wd)
  );

  branch_cmp #(.W(32)) u_cmp (.rs_val, .rt_val, .eq, .ltz);

  addr_calc #(.W(32)) u_addr (.pc, .imm16, .target26, .seqa, .braa, .jmpa);

  nextpc_ctrl u_ctrl (
    .cflow, .eq, .ltz, .reset, .exc_req, .status, .sel, .xr
  );

  nextpc_mux #(.W(32)) u_mux (
    .sel, .seqa, .braa, .jmpa, .rs(rs_val),
    .rsta(RST_ADDR), .bexa(BEX_ADDR), .exca(exc_addr),
    .epc, .eepc, .nextpc
  );

  always_ff @(posedge clk) begin
    soper <= rs_val;
    toper <= rt_val;
  end

  // NextPc is always word aligned for aligned sources.
  a_aligned: assert property (@(posedge clk)
    (!reset && !exc_req && cflow != CF_JR && cflow != CF_ERET && pc[1:0] == 2'b00)
      |-> nextpc[1:0] == 2'b00);
endmodule
