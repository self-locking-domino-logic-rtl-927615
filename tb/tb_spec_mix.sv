// tb_spec_mix: runs an instruction-class mix shaped like SPECint2000 on the
// processor at its default parameters.
//
// The loop body has 100 instructions: 25 loads, 10 stores, 11 branches (10
// not taken, one loop exit test), 2 jumps (one to the next instruction, one
// loop back-edge) and 52 R-type or I-type ALU instructions (one of them the
// loop counter).  The body runs LOOPS times.  Afterwards every register and
// the stored words are compared with a small instruction-set model in this
// testbench, and the controller states per loop are compared with the count
// worked out from the class mix: per instruction the states of its class
// (load 6, store 5, R/I/jal 4, beq 3) plus the rest state.  The clk cycles
// per instruction are printed.
module tb_spec_mix;
  import slp_pkg::*;
  localparam int LOOPS = 3;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0, prog_we = 1'b0;
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
      $display("FAIL: %s", msg);
    end
  endtask

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
  int body_start, halt_pc;

  // ---------------- program generation ----------------
  // x1: data base 0x400, x2: loop counter, x3: constant 1 (never equal to the
  // values tested by the not-taken branches), x5..x15: work registers
  initial begin
    int nl = 0, ns = 0, nb = 0, nj = 0, na = 0;
    prog.push_back(i_t(12'h400, 0, 3'b000, 1));     // addi x1, x0, 0x400
    prog.push_back(i_t(LOOPS, 0, 3'b000, 2));       // addi x2, x0, LOOPS
    prog.push_back(i_t(-7, 0, 3'b000, 3));          // addi x3, x0, -7
    body_start = prog.size();
    prog.push_back(i_t(-1, 2, 3'b000, 2));          // ALU: loop counter
    na = 1;
    for (int k = 0; prog.size() - body_start < 97; k++) begin
      int slot, rd, rs1, rs2;
      slot = k % 20;
      rd  = 5 + (k % 11);
      rs1 = 5 + ((k + 3) % 11);
      rs2 = 5 + ((k + 7) % 11);
      if (slot inside {0, 4, 8, 12, 16} && nl < 25) begin
        prog.push_back(i_t(4 * (k % 16), 1, 3'b010, rd, OP_LOAD)); nl++;
        if (nl % 2 == 0) begin prog.push_back(i_t(4 * ((k + 5) % 16), 1, 3'b010, rs1, OP_LOAD)); nl++; end
      end else if (slot inside {2, 10} && ns < 10) begin
        prog.push_back(s_t(4 * (k % 16), rs2, 1)); ns++;
        if (ns < 10 && k % 3 == 0) begin prog.push_back(s_t(4 * ((k + 9) % 16), rd, 1)); ns++; end
      end else if (slot inside {6, 14, 18} && nb < 10) begin
        prog.push_back(b_t(8, 3, 0)); nb++;        // beq x0, x3 (-7): not taken
      end else if (slot == 19 && nj < 1) begin
        prog.push_back(j_t(4, 0)); nj++;           // jal x0, +4
      end else if (na < 52) begin
        case (k % 9)
          0: prog.push_back(r_t(0, rs2, rs1, 3'b000, rd));
          1: prog.push_back(r_t(32, rs2, rs1, 3'b000, rd));
          2: prog.push_back(r_t(0, rs2, rs1, 3'b111, rd));
          3: prog.push_back(r_t(0, rs2, rs1, 3'b110, rd));
          4: prog.push_back(r_t(0, rs2, rs1, 3'b100, rd));
          5: prog.push_back(r_t(0, rs2, rs1, 3'b010, rd));
          6: prog.push_back(i_t(k * 37 - 300, rs1, 3'b000, rd));
          7: prog.push_back(i_t(k * 11, rs1, 3'b110, rd));
          default: prog.push_back(i_t(k * 5 - 40, rs1, 3'b010, rd));
        endcase
        na++;
      end
    end
    // fill up the classes that the interleave did not reach
    while (nl < 25) begin prog.push_back(i_t(4 * nl % 64, 1, 3'b010, 5 + nl % 11, OP_LOAD)); nl++; end
    while (ns < 10) begin prog.push_back(s_t(4 * ns, 5 + ns, 1)); ns++; end
    while (nb < 10) begin prog.push_back(b_t(8, 3, 0)); nb++; end
    while (na < 52) begin prog.push_back(i_t(na, 5 + na % 11, 3'b000, 5 + (na + 1) % 11)); na++; end
    // loop control: exit test and back-edge
    prog.push_back(b_t(8, 0, 2));                             // beq x2, x0, exit
    prog.push_back(j_t(-4 * (prog.size() - body_start), 0));  // jal x0, body
    halt_pc = 4 * prog.size();
    prog.push_back(j_t(0, 0));                                // exit: halt
    check(prog.size() - body_start - 1 == 100, $sformatf("loop body has %0d instructions", prog.size() - body_start - 1));
  end

  // ---------------- instruction-set model ----------------
  logic [31:0] mreg [32];
  logic [31:0] mmem [1024];
  int model_states;

  task automatic run_model();
    logic [31:0] mpc, ins, imm, v1, v2, res;
    int guard;
    for (int i = 0; i < 32; i++) mreg[i] = '0;
    for (int i = 0; i < 1024; i++) mmem[i] = '0;
    foreach (prog[i]) mmem[i] = prog[i];
    for (int i = 0; i < 16; i++) mmem[256 + i] = 32'h1000 * i + 3 * i + 1;
    mpc = 0; guard = 0; model_states = 0;
    while (mpc != halt_pc && guard < 100000) begin
      ins = mmem[mpc[11:2]];
      v1 = mreg[ins[19:15]]; v2 = mreg[ins[24:20]];
      guard++;
      case (ins[6:0])
        OP_LOAD: begin
          imm = {{20{ins[31]}}, ins[31:20]};
          if (ins[11:7] != 0) mreg[ins[11:7]] = mmem[(v1 + imm) >> 2];
          mpc += 4; model_states += 7;
        end
        OP_STORE: begin
          imm = {{20{ins[31]}}, ins[31:25], ins[11:7]};
          mmem[(v1 + imm) >> 2] = v2;
          mpc += 4; model_states += 6;
        end
        OP_BRANCH: begin
          imm = {{19{ins[31]}}, ins[31], ins[7], ins[30:25], ins[11:8], 1'b0};
          mpc = (v1 == v2) ? mpc + imm : mpc + 4; model_states += 4;
        end
        OP_JAL: begin
          imm = {{11{ins[31]}}, ins[31], ins[19:12], ins[20], ins[30:21], 1'b0};
          if (ins[11:7] != 0) mreg[ins[11:7]] = mpc + 4;
          mpc += imm; model_states += 5;
        end
        default: begin
          if (ins[6:0] == OP_RTYPE) imm = v2; else imm = {{20{ins[31]}}, ins[31:20]};
          case (ins[14:12])
            3'b000: res = (ins[6:0] == OP_RTYPE && ins[30]) ? v1 - imm : v1 + imm;
            3'b010: res = ($signed(v1) < $signed(imm)) ? 1 : 0;
            3'b100: res = v1 ^ imm;
            3'b110: res = v1 | imm;
            3'b111: res = v1 & imm;
            default: res = v1 + imm;
          endcase
          if (ins[11:7] != 0) mreg[ins[11:7]] = res;
          mpc += 4; model_states += 5;
        end
      endcase
    end
  endtask

  int steps = 0, n_instr = 0, cycles = 0;
  always @(posedge clk) if (run) begin
    cycles++;
    if (step) steps++;
    if (instr_done) n_instr++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    #1;
    foreach (prog[i]) begin
      @(negedge clk); prog_we = 1'b1; prog_addr = i; prog_wdata = prog[i];
    end
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); prog_we = 1'b1; prog_addr = 256 + i; prog_wdata = 32'h1000 * i + 3 * i + 1;
    end
    @(negedge clk); prog_we = 1'b0;
    run_model();
    run = 1'b1;
    // run until the halt instruction has been fetched, then let it finish
    while (!(pc == halt_pc + 4) && cycles < 200000) @(posedge clk);
    while (!(pc == halt_pc) && cycles < 200000) @(posedge clk);
    run = 1'b0;
    repeat (100) @(posedge clk);
    check(pc == halt_pc, "reached the halt instruction");
    for (int r = 1; r < 32; r++) begin
      dbg_reg = 5'(r); #1;
      check(dbg_reg_data == mreg[r], $sformatf("x%0d = %h, model %h", r, dbg_reg_data, mreg[r]));
    end
    for (int i = 0; i < 16; i++)
      check(dut.u_mem.mem[256 + i] == mmem[256 + i], $sformatf("data word %0d", i));
    // states: the model counts the rest state after each instruction; the
    // halt jal has its fetch, decode and execute (and possibly its write-back)
    // done when run stops
    check(steps >= model_states + 3 && steps <= model_states + 4,
          $sformatf("controller states %0d, from the class mix %0d", steps, model_states));
    $display("instructions %0d, controller states %0d, clk cycles %0d, cycles/instruction %0.2f, states/instruction %0.2f",
             n_instr, steps, cycles, real'(cycles) / n_instr, real'(steps) / n_instr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
