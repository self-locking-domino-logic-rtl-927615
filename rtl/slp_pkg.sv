// slp_pkg: types and constants shared by the self-locking domino RISC-V CPU.
//
// Holds the RV32 opcodes of the supported instruction classes (load, store,
// R-type, I-type ALU, BEQ, JAL), the ALU operation codes, the one-hot state
// positions of the domino controller and the control-signal bundle that the
// controller's output function drives into the datapath.  The opcodes are the
// RISC-V ones; the ALU and ImmSrc encodings are this design's own choice.
package slp_pkg;

  // Opcodes (instr[6:0])
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_RTYPE  = 7'b0110011;
  localparam logic [6:0] OP_ITYPE  = 7'b0010011;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_JAL    = 7'b1101111;

  // ALU operations (ALUControl)
  typedef enum logic [2:0] {
    ALU_ADD = 3'b000,
    ALU_SUB = 3'b001,
    ALU_AND = 3'b010,
    ALU_OR  = 3'b011,
    ALU_XOR = 3'b100,
    ALU_SLT = 3'b101
  } alu_op_e;

  // One-hot state positions of the domino controller (z-variables)
  localparam int Z_FETCH  = 0;  // S0
  localparam int Z_DECODE = 1;  // S1
  localparam int Z_EXEC   = 2;  // S2 / S6 / S8 / S9 / S10
  localparam int Z_WB1    = 3;  // S3 / S5Int / S7
  localparam int Z_WB2    = 4;  // S4Int / S5
  localparam int Z_WB3    = 5;  // S4

  // ALUSrcA / ALUSrcB / ResultSrc / ImmSrc encodings
  localparam logic [1:0] SRCA_PC    = 2'b00;
  localparam logic [1:0] SRCA_OLDPC = 2'b01;
  localparam logic [1:0] SRCA_A     = 2'b10;
  localparam logic [1:0] SRCB_B     = 2'b00;
  localparam logic [1:0] SRCB_IMM   = 2'b01;
  localparam logic [1:0] SRCB_FOUR  = 2'b10;
  localparam logic [1:0] RES_ALUOUT = 2'b00;
  localparam logic [1:0] RES_DATA   = 2'b01;
  localparam logic [1:0] RES_ALURES = 2'b10;
  localparam logic [1:0] IMM_I      = 2'b00;
  localparam logic [1:0] IMM_S      = 2'b01;
  localparam logic [1:0] IMM_B      = 2'b10;
  localparam logic [1:0] IMM_J      = 2'b11;

  // ALUCtrl(6:0) = {ALUSrcA, ALUSrcB, ALUControl}
  typedef struct packed {
    logic [1:0] src_a;
    logic [1:0] src_b;
    alu_op_e    op;
  } alu_ctrl_t;

  // Control outputs of the controller's output function
  typedef struct packed {
    logic       pc_write;
    logic       adr_src;
    logic       mem_write;
    logic       ir_write;
    logic [1:0] res_src;
    alu_ctrl_t  alu_ctrl;
    logic [1:0] imm_src;
    logic       reg_write;
    logic       uses_alu;   // this state starts an ALU handshake
  } ctrl_t;

endpackage
