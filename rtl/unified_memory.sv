// unified_memory: block-RAM instruction/data memory of the CPU.
//
// One array of WORDS 32-bit words with two ports, as a true dual-port block
// RAM: the instruction port reads the word at iaddr, the data port reads or
// writes the word at daddr.  Addresses are byte addresses; only whole words
// are accessed (bits 1:0 are ignored) and the address wraps at the memory
// size.  A third write port (prog_*) with a word address loads programs while
// the CPU is held.  Timing: reads pass the array register and, with
// READ_LATENCY = 2 (the document's two-cycle block-RAM access), an output
// register, so data appears two clk cycles after the address; writes take
// effect at the clk edge.  The size and the loader port are this design's
// own choices.
module unified_memory #(
  parameter int unsigned WORDS        = 1024,
  parameter int unsigned READ_LATENCY = 2,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic [31:0] iaddr,
  output logic [31:0] idata,
  input  logic [31:0] daddr,
  input  logic        dwe,
  input  logic [31:0] dwdata,
  output logic [31:0] drdata,
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_wdata
);

  logic [31:0] mem [WORDS];

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
  end

  logic [31:0] idata_r, drdata_r;

  always_ff @(posedge clk) begin
    if (prog_we)  mem[prog_addr[AW-1:0]] <= prog_wdata;
    else if (dwe) mem[daddr[AW+1:2]]     <= dwdata;
    idata_r  <= mem[iaddr[AW+1:2]];
    drdata_r <= mem[daddr[AW+1:2]];
  end

  if (READ_LATENCY > 1) begin : g_outreg
    always_ff @(posedge clk) begin
      idata  <= idata_r;
      drdata <= drdata_r;
    end
  end else begin : g_noreg
    assign idata  = idata_r;
    assign drdata = drdata_r;
  end

endmodule
