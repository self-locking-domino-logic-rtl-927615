// tb_riscv_async_cpu: end-to-end test of the processor at its default
// parameters.
//
// Loads a program that uses every supported instruction (addi, slti, ori,
// xori, andi, add, sub, and, or, xor, slt, sw, lw, beq taken and not taken,
// jal) in a loop that sums an array and stores it, runs it, and checks the
// register and memory results against values worked out by hand.  For every
// finished instruction it checks the number of controller states (beq 3,
// R/I/jal 4, sw 5, lw 6, plus the rest state) and counts how often each
// mechanism happened: controller and ALU handshakes, precharge phases, each
// exit edge of the automaton (A, B, C and the full load path), taken and
// not-taken branches, jumps, memory writes and register writes.  The length
// of every state is checked too: 2*DELTA+4 clk cycles for a state without
// the ALU, 4*DELTA+7 for one with an ALU handshake.  A mechanism
// that never happened counts as a failure.
module tb_riscv_async_cpu;
  import slp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic prog_we = 1'b0;
  logic [31:0] prog_addr = '0, prog_wdata = '0;
  logic [4:0] dbg_reg = '0;
  logic [31:0] dbg_reg_data, pc;
  logic [5:0] state;
  logic step, instr_done;
  int checks = 0, failures = 0;

  riscv_async_cpu dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", msg, $time);
    end
  endtask

  // ---------------- instruction encoders ----------------
  function automatic logic [31:0] r_t(int f7, int rs2, int rs1, int f3, int rd);
    return {7'(f7), 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), OP_RTYPE};
  endfunction
  function automatic logic [31:0] i_t(int imm, int rs1, int f3, int rd, logic [6:0] o = OP_ITYPE);
    return {12'(imm), 5'(rs1), 3'(f3), 5'(rd), o};
  endfunction
  function automatic logic [31:0] s_t(int imm, int rs2, int rs1);
    logic [11:0] m;
    m = 12'(imm);
    return {m[11:5], 5'(rs2), 5'(rs1), 3'b010, m[4:0], OP_STORE};
  endfunction
  function automatic logic [31:0] b_t(int imm, int rs2, int rs1);
    logic [12:0] m;
    m = 13'(imm);
    return {m[12], m[10:5], 5'(rs2), 5'(rs1), 3'b000, m[4:1], m[11], OP_BRANCH};
  endfunction
  function automatic logic [31:0] j_t(int imm, int rd);
    logic [20:0] m;
    m = 21'(imm);
    return {m[20], m[10:1], m[11], m[19:12], 5'(rd), OP_JAL};
  endfunction

  logic [31:0] prog [$];
  int halt_pc;

  initial begin
    // data array at byte 0x200: 3, 5, 7, 9 (word 128..131)
    prog = '{
      /* 0x00 */ i_t(12'h200, 0, 3'b000, 1),      // addi x1, x0, 0x200   array base
      /* 0x04 */ i_t(4, 0, 3'b000, 2),            // addi x2, x0, 4       count
      /* 0x08 */ i_t(0, 0, 3'b000, 3),            // addi x3, x0, 0       sum
      /* 0x0c */ i_t(0, 1, 3'b010, 4, OP_LOAD),   // loop: lw x4, 0(x1)
      /* 0x10 */ r_t(0, 4, 3, 3'b000, 3),         // add x3, x3, x4
      /* 0x14 */ i_t(4, 1, 3'b000, 1),            // addi x1, x1, 4
      /* 0x18 */ i_t(-1, 2, 3'b000, 2),           // addi x2, x2, -1
      /* 0x1c */ b_t(12, 0, 2),                   // beq x2, x0, +12 -> 0x28
      /* 0x20 */ j_t(-20, 0),                     // jal x0, -20 -> 0x0c
      /* 0x24 */ i_t(99, 0, 3'b000, 20),          // addi x20, x0, 99 (skipped)
      /* 0x28 */ s_t(16, 3, 1),                   // sw x3, 16(x1)  -> 0x220
      /* 0x2c */ i_t(16, 1, 3'b010, 5, OP_LOAD),  // lw x5, 16(x1)
      /* 0x30 */ r_t(32, 4, 5, 3'b000, 6),        // sub x6, x5, x4      24-9 = 15
      /* 0x34 */ r_t(0, 6, 5, 3'b111, 7),         // and x7, x5, x6      24&15 = 8
      /* 0x38 */ r_t(0, 6, 5, 3'b110, 8),         // or  x8, x5, x6      31
      /* 0x3c */ r_t(0, 6, 5, 3'b100, 9),         // xor x9, x5, x6      23
      /* 0x40 */ r_t(0, 5, 6, 3'b010, 10),        // slt x10, x6, x5     1
      /* 0x44 */ r_t(0, 6, 5, 3'b010, 11),        // slt x11, x5, x6     0
      /* 0x48 */ i_t(-5, 0, 3'b000, 12),          // addi x12, x0, -5
      /* 0x4c */ i_t(0, 12, 3'b010, 13),          // slti x13, x12, 0    1
      /* 0x50 */ i_t(12'h0f0, 12, 3'b111, 14),    // andi x14, x12, 0xf0 0xf0
      /* 0x54 */ i_t(12'h100, 0, 3'b110, 15),     // ori  x15, x0, 0x100
      /* 0x58 */ i_t(-1, 15, 3'b100, 16),         // xori x16, x15, -1   0xfffffeff
      /* 0x5c */ b_t(8, 5, 4),                    // beq x4, x5, +8 (not taken)
      /* 0x60 */ j_t(8, 17),                      // jal x17, +8 -> 0x68, x17 = 0x64
      /* 0x64 */ i_t(77, 0, 3'b000, 21),          // addi x21, x0, 77 (skipped)
      /* 0x68 */ j_t(0, 0)                        // halt: jal x0, 0
    };
    halt_pc = 32'h68;
  end

  // ---------------- monitors ----------------
  int steps_since = 0, n_instr = 0;
  int n_ctrl_hs = 0, n_alu_hs = 0, n_ctrl_pre = 0, n_alu_pre = 0;
  int n_edge_a = 0, n_edge_b = 0, n_edge_c = 0, n_edge_load = 0;
  int n_br_taken = 0, n_br_not = 0, n_jal = 0, n_memw = 0, n_regw = 0, n_ops[6];
  logic [5:0] last_z = '0;
  logic ctrl_dc_d = 1'b1, alu_dc_d = 1'b1;
  int since_commit = 0, n_dur_alu = 0, n_dur_plain = 0;
  bit first_commit = 1'b1;
  localparam int DELTA = 2;   // the CPU's default

  function automatic int states_of(logic [6:0] o);
    case (o)
      OP_BRANCH: return 3;
      OP_STORE:  return 5;
      OP_LOAD:   return 6;
      default:   return 4;
    endcase
  endfunction

  always @(posedge clk) if (rst_n) begin
    ctrl_dc_d <= dut.u_ctrl.dc_n;
    alu_dc_d  <= dut.u_alu.dc_n;
    if (ctrl_dc_d && !dut.u_ctrl.dc_n) n_ctrl_pre++;
    if (alu_dc_d && !dut.u_alu.dc_n) n_alu_pre++;
    if (dut.ctrl_req && dut.ctrl_ack) n_ctrl_hs++;
    if (dut.alu_req && dut.alu_ack) begin
      n_alu_hs++;
      n_ops[int'(dut.ctrl.alu_ctrl.op)]++;
    end
    since_commit++;
    if (step) begin
      // state length: controller handshake (+ ALU handshake) + commit
      if (!first_commit) begin
        if (dut.ctrl.uses_alu) begin
          check(since_commit == 4*DELTA + 7, $sformatf("ALU state took %0d cycles", since_commit));
          n_dur_alu++;
        end else begin
          check(since_commit == 2*DELTA + 4, $sformatf("plain state took %0d cycles", since_commit));
          n_dur_plain++;
        end
      end
      first_commit = 1'b0;
      since_commit = 0;
      steps_since++;
      if (dut.ctrl.mem_write) n_memw++;
      if (dut.ctrl.reg_write) n_regw++;
      if (state != 0) last_z <= state;
      if (state[Z_EXEC] && dut.ir[6:0] == OP_BRANCH) begin
        if (dut.zero) n_br_taken++; else n_br_not++;
      end
      if (state[Z_EXEC] && dut.ir[6:0] == OP_JAL) n_jal++;
    end
    if (instr_done) begin
      n_instr++;
      check(steps_since == states_of(dut.ir[6:0]) + 1,
            $sformatf("instr %h: %0d steps, expected %0d", dut.ir, steps_since, states_of(dut.ir[6:0]) + 1));
      case (last_z)
        6'b000100: n_edge_a++;
        6'b001000: n_edge_b++;
        6'b010000: n_edge_c++;
        6'b100000: n_edge_load++;
        default: ;
      endcase
      steps_since = 0;
    end
  end

  task automatic expect_reg(int r, logic [31:0] v);
    dbg_reg = 5'(r); #1;
    check(dbg_reg_data == v, $sformatf("x%0d = %h, expected %h", r, dbg_reg_data, v));
  endtask

  task automatic mechanism(string name, int n);
    check(n > 0, {name, " happened"});
    $display("  %-28s %0d", name, n);
  endtask

  int cycles = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // load program and data
    foreach (prog[i]) begin
      @(negedge clk); prog_we = 1'b1; prog_addr = i; prog_wdata = prog[i];
    end
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); prog_we = 1'b1; prog_addr = 128 + i; prog_wdata = 3 + 2*i;
    end
    @(negedge clk); prog_we = 1'b0;
    run = 1'b1;
    // run until the halt loop has been fetched a few times
    while (!(pc == halt_pc + 4 && n_jal >= 6) && cycles < 20000) begin
      @(posedge clk);
      cycles++;
    end
    run = 1'b0;
    repeat (50) @(posedge clk);
    check(cycles < 20000, "program reached the halt loop");
    expect_reg(1, 32'h210);
    expect_reg(2, 0);
    expect_reg(3, 24);
    expect_reg(4, 9);
    expect_reg(5, 24);
    expect_reg(6, 15);
    expect_reg(7, 8);
    expect_reg(8, 31);
    expect_reg(9, 23);
    expect_reg(10, 1);
    expect_reg(11, 0);
    expect_reg(12, 32'hFFFF_FFFB);
    expect_reg(13, 1);
    expect_reg(14, 32'h0000_00F0);
    expect_reg(15, 32'h100);
    expect_reg(16, 32'hFFFF_FEFF);
    expect_reg(17, 32'h64);
    expect_reg(20, 0);
    expect_reg(21, 0);
    expect_reg(0, 0);
    check(dut.u_mem.mem[136] == 24, "sum stored at 0x220");
    $display("instructions %0d, cycles %0d", n_instr, cycles);
    mechanism("timed states with ALU", n_dur_alu);
    mechanism("timed states without ALU", n_dur_plain);
    mechanism("controller handshakes", n_ctrl_hs);
    mechanism("controller precharge phases", n_ctrl_pre);
    mechanism("ALU handshakes", n_alu_hs);
    mechanism("ALU precharge phases", n_alu_pre);
    mechanism("edge A (beq)", n_edge_a);
    mechanism("edge B (R/I/jal)", n_edge_b);
    mechanism("edge C (store)", n_edge_c);
    mechanism("full path (load)", n_edge_load);
    mechanism("branch taken", n_br_taken);
    mechanism("branch not taken", n_br_not);
    mechanism("jal", n_jal);
    mechanism("memory writes", n_memw);
    mechanism("register writes", n_regw);
    mechanism("ALU add", n_ops[ALU_ADD]);
    mechanism("ALU sub", n_ops[ALU_SUB]);
    mechanism("ALU and", n_ops[ALU_AND]);
    mechanism("ALU or", n_ops[ALU_OR]);
    mechanism("ALU xor", n_ops[ALU_XOR]);
    mechanism("ALU slt", n_ops[ALU_SLT]);
    check(n_ctrl_hs == n_ctrl_pre, "one precharge per controller handshake");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
