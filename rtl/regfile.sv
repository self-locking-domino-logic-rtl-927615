// regfile: RV32 register file, NREGS x XLEN bits.
//
// Two asynchronous read ports for rs1 and rs2, one synchronous write port and
// a third read port for observing registers from outside.  Register x0 always
// reads 0 and is never written.  Timing: a write at the rising clk edge is
// visible on the read ports right after that edge.  The document only names
// the register file; ports and timing are this design's own choice.
module regfile #(
  parameter int unsigned XLEN  = 32,
  parameter int unsigned NREGS = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic            clk,
  input  logic            we,
  input  logic [AW-1:0]   ra1,
  input  logic [AW-1:0]   ra2,
  input  logic [AW-1:0]   ra3,
  input  logic [AW-1:0]   wa,
  input  logic [XLEN-1:0] wd,
  output logic [XLEN-1:0] rd1,
  output logic [XLEN-1:0] rd2,
  output logic [XLEN-1:0] rd3
);

  logic [XLEN-1:0] regs [NREGS];

  initial begin
    for (int i = 0; i < NREGS; i++) regs[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we && wa != '0) regs[wa] <= wd;
  end

  assign rd1 = (ra1 == '0) ? '0 : regs[ra1];
  assign rd2 = (ra2 == '0) ? '0 : regs[ra2];
  assign rd3 = (ra3 == '0) ? '0 : regs[ra3];

endmodule
