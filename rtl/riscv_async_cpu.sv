// riscv_async_cpu: multicycle RV32 processor whose control unit is a
// self-locking dual-rail domino pipeline and whose ALU is a self-locking
// dual-rail domino ALU.
//
// The datapath is the classic multicycle one: a unified instruction/data
// memory, the instruction register IR, the PC and OldPC registers, the
// register file with its A and B output registers, the immediate generator,
// the ALU with its ALUOut register, the memory data register Data, the source
// multiplexers (ALU A: PC, OldPC, A; ALU B: B, immediate, 4) and the result
// multiplexer (00 ALUOut, 01 Data, 10 ALU result).  The memory has an
// instruction port at PC and a data port whose address is chosen by AdrSrc
// (PC or ALUOut).  Instructions: lw, sw,
// add/sub/and/or/xor/slt, addi/andi/ori/xori/slti, beq, jal.
//
// Instead of a clocked Moore state machine, domino_controller steps through
// the one-hot states of each instruction, one request/acknowledge handshake
// per state, and step_sequencer starts the ALU handshake only in the states
// that use the ALU.  A state thus lasts as long as the units it uses need;
// the datapath registers load on the one-cycle commit strobe that ends each
// state.  State counts per instruction: beq 3, R/I/jal 4, sw 5, lw 6, plus
// one rest state (000000) between instructions.
//
// Ports: clk and rst_n; run starts execution at PC 0; prog_* writes program
// words while run is low; dbg_reg selects a register shown on dbg_reg_data;
// pc, state, step (commit of each state) and instr_done (commit of the rest
// state, i.e. an instruction has finished) are for observation.
// The loader and debug ports are this design's own additions.
module riscv_async_cpu
  import slp_pkg::*;
#(
  parameter int unsigned XLEN      = 32,
  parameter int unsigned MEM_WORDS = 1024,
  parameter int unsigned DELTA     = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  input  logic            prog_we,
  input  logic [31:0]     prog_addr,
  input  logic [31:0]     prog_wdata,
  input  logic [4:0]      dbg_reg,
  output logic [XLEN-1:0] dbg_reg_data,
  output logic [XLEN-1:0] pc,
  output logic [5:0]      state,
  output logic            step,
  output logic            instr_done
);

  logic [XLEN-1:0] old_pc, ir, a_reg, b_reg, alu_out, data_reg;
  logic [XLEN-1:0] rd1, rd2, imm_ext, src_a, src_b, alu_result, result;
  logic [XLEN-1:0] idata, drdata;
  logic            ctrl_req, ctrl_ack;
  logic            alu_req, alu_ack, alu_en, zero, commit;
  logic [5:0]      z;
  ctrl_t           ctrl;

  // ---------------- control ----------------
  domino_controller #(.DELTA(DELTA)) u_ctrl (
    .clk, .rst_n, .req(ctrl_req),
    .op(ir[6:0]), .funct3(ir[14:12]), .funct7_5(ir[30]), .zero,
    .ack(ctrl_ack), .en(), .dc_n(), .z, .ctrl
  );

  step_sequencer u_seq (
    .clk, .rst_n, .run, .ctrl_ack, .uses_alu(ctrl.uses_alu), .alu_ack,
    .ctrl_req, .alu_req, .commit
  );

  // ---------------- datapath ----------------
  unified_memory #(.WORDS(MEM_WORDS)) u_mem (
    .clk, .iaddr(pc), .idata, .daddr(ctrl.adr_src ? alu_out : pc),
    .dwe(commit & ctrl.mem_write), .dwdata(b_reg), .drdata,
    .prog_we, .prog_addr, .prog_wdata
  );

  regfile #(.XLEN(XLEN)) u_rf (
    .clk, .we(commit & ctrl.reg_write),
    .ra1(ir[19:15]), .ra2(ir[24:20]), .ra3(dbg_reg), .wa(ir[11:7]),
    .wd(result), .rd1, .rd2, .rd3(dbg_reg_data)
  );

  imm_extend u_ext (.instr(ir[31:7]), .imm_src(ctrl.imm_src), .imm_ext);

  always_comb begin
    unique case (ctrl.alu_ctrl.src_a)
      SRCA_PC:    src_a = pc;
      SRCA_OLDPC: src_a = old_pc;
      default:    src_a = a_reg;
    endcase
    unique case (ctrl.alu_ctrl.src_b)
      SRCB_B:     src_b = b_reg;
      SRCB_IMM:   src_b = imm_ext;
      default:    src_b = XLEN'(4);
    endcase
    unique case (ctrl.res_src)
      RES_ALUOUT: result = alu_out;
      RES_DATA:   result = data_reg;
      default:    result = alu_result;
    endcase
  end

  domino_alu #(.XLEN(XLEN), .DELTA(DELTA)) u_alu (
    .clk, .rst_n, .req(alu_req), .a(src_a), .b(src_b), .alu_ctrl(ctrl.alu_ctrl.op),
    .result(alu_result), .zero, .en(alu_en), .ack(alu_ack), .dc_n(), .f_q()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc       <= '0;
      old_pc   <= '0;
      ir       <= '0;
      a_reg    <= '0;
      b_reg    <= '0;
      alu_out  <= '0;
      data_reg <= '0;
    end else if (commit) begin
      if (ctrl.pc_write) pc <= result;
      if (ctrl.ir_write) begin
        ir     <= idata;
        old_pc <= pc;
      end
      if (ctrl.uses_alu) alu_out <= alu_result;
      a_reg    <= rd1;
      b_reg    <= rd2;
      data_reg <= drdata;
    end
  end

  assign state      = z;
  assign step       = commit;
  assign instr_done = commit & (z == '0);

  // The ALU result is taken only after completion detection
  a_alu_complete: assert property (@(posedge clk) disable iff (!rst_n)
                                   commit && ctrl.uses_alu |-> alu_en);

endmodule
