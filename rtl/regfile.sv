// regfile: general-purpose register file read in the DEC stage.
//
// NREGS registers of W bits with two combinational read ports (Rs, Rt) and
// one write port written on the rising clock edge. Register 0 always reads
// as zero, which Blez and Bgtz rely on (their Rt field is 0). The write port
// is driven by the later pipeline stages; there is no write-to-read bypass.
// Size, port count and write timing are this design's choice.
module regfile #(
  parameter int unsigned W     = 32,
  parameter int unsigned NREGS = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic [AW-1:0] ra_s,
  input  logic [AW-1:0] ra_t,
  output logic [W-1:0]  rd_s,
  output logic [W-1:0]  rd_t,
  input  logic          we,
  input  logic [AW-1:0] wa,
  input  logic [W-1:0]  wd
);
  logic [W-1:0] regs [NREGS];

  always_ff @(posedge clk)
    if (we && wa != '0) regs[wa] <= wd;

  assign rd_s = (ra_s == '0) ? '0 : regs[ra_s];
  assign rd_t = (ra_t == '0) ? '0 : regs[ra_t];
endmodule
