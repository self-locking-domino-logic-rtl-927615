// domino_controller: control unit of the multicycle RISC-V CPU as a
// self-locking dual-rail domino pipeline.
//
// The automaton has six one-hot state bits z0..z5 (plus the all-zero rest
// state).  Each bit is the D-register behind one dual-rail domino stage F_i;
// stage i looks at the previous state bit and at the decoded opcode held in
// the input register X:
//   F0 = (z == 0)    F1 = z0    F2 = z1
//   F3 = z2 . /A     F4 = z3 . /B     F5 = z4 . /C
// with A = BEQ, B = R-type, I-type or JAL, C = store.  So an instruction walks
// 000001 -> 000010 -> 000100 and leaves by edge A (BEQ, 3 states), by edge B
// (R, I, JAL, 4 states), by edge C (store, 5 states) or after 100000 (load,
// 6 states), back to 000000; the next request starts the next fetch.
//
// One request pulse advances the automaton by one state:
//   - req enters the pulse circuit; when the controller is complete (en) and
//     recovered it fires: at that falling edge of dc_n the state registers
//     take the evaluated rails of F0..F5;
//   - precharge for tau-Delta empties all stages;
//   - at the rising edge of dc_n X takes the opcode and the stages evaluate
//     the next state; completion detection over all six stages raises en,
//     which unlocks the input; ack = en and recovered.
// The control outputs (Mealy function lambda) depend on the state and on X.
// Lambda is itself a self-locked dual-rail stage: its outputs are all zero
// during precharge, valid in evaluation, and its completion joins en.  So
// they are valid while ack is high and stay so until the next request.  The
// BEQ term of pc_write is ANDed with the zero flag after lambda, since zero
// comes from the ALU handshake that follows the controller's.  The z-to-state mapping follows the
// document's state graph (z0 fetch, z1 decode, z2 memory address / execute /
// JAL / BEQ, z3 memory read / write set-up / ALU write-back, z4 second memory
// cycle / memory write, z5 memory write-back).  The control values of each
// state, the ALU encoding and the zero input are this design's own,
// following the usual multicycle RISC-V controller.
module domino_controller
  import slp_pkg::*;
#(
  parameter int unsigned NSTATES = 6,
  parameter int unsigned DELTA   = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               req,
  input  logic [6:0]         op,        // bits 1:0 unused: decoding uses op(6:2)
  input  logic [2:0]         funct3,
  input  logic               funct7_5,
  input  logic               zero,
  output logic               ack,
  output logic               en,
  output logic               dc_n,
  output logic [NSTATES-1:0] z,
  output ctrl_t              ctrl
);

  logic ready, fall_next, rise_next;

  pulse_circuit #(.DELTA(DELTA)) u_delta (
    .clk, .rst_n, .p(req), .en, .y(), .q(), .dq(), .dc_n, .ready, .fall_next, .rise_next
  );

  // Input register X: loaded on the rising edge of dc_n
  logic [6:2] op_x;
  logic [2:0] funct3_x;
  logic       funct7_5_x;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_x       <= '0;
      funct3_x   <= '0;
      funct7_5_x <= 1'b0;
    end else if (rise_next) begin
      op_x       <= op[6:2];
      funct3_x   <= funct3;
      funct7_5_x <= funct7_5;
    end
  end

  // Branch conditions of the automaton
  logic is_load, is_store, is_r, is_i, is_beq, is_jal;
  logic edge_a, edge_b, edge_c;
  always_comb begin
    // decoded from op(6:2); bits 1:0 are 11 for every 32-bit instruction
    is_load  = (op_x[6:2] == OP_LOAD[6:2]);
    is_store = (op_x[6:2] == OP_STORE[6:2]);
    is_r     = (op_x[6:2] == OP_RTYPE[6:2]);
    is_beq   = (op_x[6:2] == OP_BRANCH[6:2]);
    is_jal   = (op_x[6:2] == OP_JAL[6:2]);
    is_i     = !(is_load || is_store || is_r || is_beq || is_jal);
    edge_a   = is_beq;
    edge_b   = is_r || is_i || is_jal;
    edge_c   = is_store;
  end

  // Domino stages F0..F5
  logic [NSTATES-1:0] f, f_n;

  drdl_gate #(.N(NSTATES), .FUNC({{((1<<NSTATES)-1){1'b0}}, 1'b1})) u_f0 (
    .dc_n, .x(z), .f(f[0]), .f_n(f_n[0])
  );
  drdl_gate #(.N(1), .FUNC(2'b10)) u_f1 (.dc_n, .x(z[0]), .f(f[1]), .f_n(f_n[1]));
  drdl_gate #(.N(1), .FUNC(2'b10)) u_f2 (.dc_n, .x(z[1]), .f(f[2]), .f_n(f_n[2]));
  // {cond, z}: true for z=1, cond=0 -> index 1
  drdl_gate #(.N(2), .FUNC(4'b0010)) u_f3 (.dc_n, .x({edge_a, z[2]}), .f(f[3]), .f_n(f_n[3]));
  drdl_gate #(.N(2), .FUNC(4'b0010)) u_f4 (.dc_n, .x({edge_b, z[3]}), .f(f[4]), .f_n(f_n[4]));
  drdl_gate #(.N(2), .FUNC(4'b0010)) u_f5 (.dc_n, .x({edge_c, z[4]}), .f(f[5]), .f_n(f_n[5]));

  logic en_state, en_lam;   // completion of the stages and of lambda
  completion_detector #(.W(NSTATES)) u_cd (.f, .f_n, .en(en_state));
  assign en = en_state & en_lam;

  // State D-registers: take the evaluated rails at the falling edge of dc_n
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         z <= '0;
    else if (fall_next) z <= f;
  end

  assign ack = en & ready;

  // ALU operation of R-type and I-type instructions
  function automatic alu_op_e alu_decode(input logic [2:0] f3, input logic sub);
    unique case (f3)
      3'b000:  return sub ? ALU_SUB : ALU_ADD;
      3'b010:  return ALU_SLT;
      3'b100:  return ALU_XOR;
      3'b110:  return ALU_OR;
      3'b111:  return ALU_AND;
      default: return ALU_ADD;
    endcase
  endfunction

  // Output function lambda (Mealy: state and X).  lam is its evaluated value;
  // the branch condition is kept apart because the zero flag only settles
  // after the ALU handshake, later than lambda evaluates.
  ctrl_t lam;
  logic  lam_branch;
  always_comb begin
    lam = '0;
    lam_branch = 1'b0;
    lam.alu_ctrl.op = ALU_ADD;
    if (is_store)      lam.imm_src = IMM_S;
    else if (is_beq)   lam.imm_src = IMM_B;
    else if (is_jal)   lam.imm_src = IMM_J;
    else               lam.imm_src = IMM_I;

    if (z[Z_FETCH]) begin                       // S0 fetch: IR <- mem[PC], PC <- PC+4
      lam.ir_write       = 1'b1;
      lam.alu_ctrl.src_a = SRCA_PC;
      lam.alu_ctrl.src_b = SRCB_FOUR;
      lam.res_src        = RES_ALURES;
      lam.pc_write       = 1'b1;
      lam.uses_alu       = 1'b1;
    end
    if (z[Z_DECODE]) begin                      // S1 decode: ALUOut <- OldPC+imm
      lam.alu_ctrl.src_a = SRCA_OLDPC;
      lam.alu_ctrl.src_b = SRCB_IMM;
      lam.uses_alu       = 1'b1;
    end
    if (z[Z_EXEC]) begin
      lam.uses_alu = 1'b1;
      if (is_load || is_store) begin            // S2 memory address
        lam.alu_ctrl.src_a = SRCA_A;
        lam.alu_ctrl.src_b = SRCB_IMM;
      end else if (is_r) begin                  // S6 execute R
        lam.alu_ctrl.src_a = SRCA_A;
        lam.alu_ctrl.src_b = SRCB_B;
        lam.alu_ctrl.op    = alu_decode(funct3_x, funct7_5_x);
      end else if (is_jal) begin                // S9 JAL: PC <- target, ALUOut <- OldPC+4
        lam.alu_ctrl.src_a = SRCA_OLDPC;
        lam.alu_ctrl.src_b = SRCB_FOUR;
        lam.res_src        = RES_ALUOUT;
        lam.pc_write       = 1'b1;
      end else if (is_beq) begin                // S10 BEQ
        lam.alu_ctrl.src_a = SRCA_A;
        lam.alu_ctrl.src_b = SRCB_B;
        lam.alu_ctrl.op    = ALU_SUB;
        lam.res_src        = RES_ALUOUT;
        lam_branch          = 1'b1;
      end else begin                            // S8 execute I
        lam.alu_ctrl.src_a = SRCA_A;
        lam.alu_ctrl.src_b = SRCB_IMM;
        lam.alu_ctrl.op    = alu_decode(funct3_x, 1'b0);
      end
    end
    if (z[Z_WB1]) begin
      if (is_load || is_store) begin            // S3 memory read / S5Int write set-up
        lam.adr_src = 1'b1;
        lam.res_src = RES_ALUOUT;
      end else begin                            // S7 ALU write-back
        lam.res_src   = RES_ALUOUT;
        lam.reg_write = 1'b1;
      end
    end
    if (z[Z_WB2]) begin                         // S4Int second read cycle / S5 memory write
      lam.adr_src   = 1'b1;
      lam.mem_write = is_store;
    end
    if (z[Z_WB3]) begin                         // S4 memory write-back
      lam.res_src   = RES_DATA;
      lam.reg_write = 1'b1;
    end
  end

  // Lambda as a self-locked dual-rail stage: both rails empty while dc_n is
  // low, one rail per output bit set in evaluation, and its completion is
  // part of en, so the outputs are never seen half-switched.
  localparam int unsigned LW = $bits(ctrl_t) + 1;
  logic [LW-1:0] lam_f, lam_fn;
  assign lam_f  = {LW{dc_n}} &  {lam_branch, lam};
  assign lam_fn = {LW{dc_n}} & ~{lam_branch, lam};

  completion_detector #(.W(LW)) u_cd_lam (.f(lam_f), .f_n(lam_fn), .en(en_lam));

  always_comb begin
    ctrl          = ctrl_t'(lam_f[LW-2:0]);
    ctrl.pc_write = ctrl.pc_write | (lam_f[LW-1] & zero);
  end

  // The state is one-hot or all-zero
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(z));

endmodule
