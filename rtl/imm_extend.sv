// imm_extend: immediate generator of the RV32 instruction formats.
//
// From instr[31:7] it assembles the sign-extended immediate of the I-type
// (also loads), S-type, B-type and J-type formats, selected by imm_src
// (00 I, 01 S, 10 B, 11 J; the encoding is this design's own).  The bit
// positions are those of the RISC-V formats.  Combinational.
module imm_extend
  import slp_pkg::*;
(
  input  logic [31:7] instr,
  input  logic [1:0]  imm_src,
  output logic [31:0] imm_ext
);

  always_comb begin
    unique case (imm_src)
      IMM_I: imm_ext = {{20{instr[31]}}, instr[31:20]};
      IMM_S: imm_ext = {{20{instr[31]}}, instr[31:25], instr[11:7]};
      IMM_B: imm_ext = {{20{instr[31]}}, instr[7], instr[30:25], instr[11:8], 1'b0};
      default: imm_ext = {{12{instr[31]}}, instr[19:12], instr[20], instr[30:21], 1'b0};
    endcase
  end

endmodule
