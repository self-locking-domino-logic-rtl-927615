// tb_domino_controller: self-checking test of the domino pipeline controller.
//
// For each instruction class it steps the automaton with request/acknowledge
// handshakes from the rest state and checks the one-hot state sequence and
// where the instruction leaves (BEQ after 000100, R/I/JAL after 001000, store
// after 010000, load after 100000), a selection of control outputs per state,
// the handshake latency of every step (2*DELTA+2 clk edges), and that the
// control outputs, a self-locked stage themselves, are all zero in precharge.
module tb_domino_controller;
  import slp_pkg::*;
  localparam int unsigned DELTA = 2;

  logic clk = 1'b0, rst_n = 1'b0, req = 1'b0;
  logic [6:0] op;
  logic [2:0] funct3;
  logic funct7_5, zero;
  logic ack, en, dc_n;
  logic [5:0] z;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  domino_controller #(.DELTA(DELTA)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", msg, $time);
    end
  endtask

  task automatic step();
    int edges;
    check(ack == 1'b1, "controller ready before request");
    req = 1'b1;
    @(posedge clk); #1;
    req = 1'b0;
    edges = 1;
    while (!ack && edges < 50) begin
      check(!(dc_n == 1'b0 && en == 1'b1), "en low in precharge");
      if (!dc_n) check(ctrl == '0, "control outputs empty in precharge");
      @(posedge clk); #1;
      edges++;
    end
    check(edges == 2*DELTA + 2, $sformatf("step latency %0d edges", edges));
  endtask

  // Runs one instruction from the rest state; returns the number of states
  task automatic run_instr(input logic [6:0] o, input logic [2:0] f3, input logic f7,
                           input int exp_states, input string name);
    int n;
    op = o; funct3 = f3; funct7_5 = f7;
    check(z == 6'b0, {name, ": starts in rest state"});
    n = 0;
    do begin
      step();
      if (z != 0) begin
        check(z == 6'(1 << n), $sformatf("%s: state %0d is %b", name, n, z));
        // control outputs
        if (n == 0) check(ctrl.ir_write && ctrl.pc_write && ctrl.uses_alu &&
                          ctrl.alu_ctrl.src_b == SRCB_FOUR, {name, ": fetch controls"});
        if (n == 1) check(ctrl.alu_ctrl.src_a == SRCA_OLDPC && ctrl.alu_ctrl.src_b == SRCB_IMM,
                          {name, ": decode controls"});
        if (n == 2 && o == OP_BRANCH) begin
          check(ctrl.alu_ctrl.op == ALU_SUB && ctrl.pc_write == zero, {name, ": beq controls"});
        end
        if (n == 2 && o == OP_RTYPE)
          check(ctrl.alu_ctrl.op == (f7 ? ALU_SUB : ALU_ADD) || f3 != 3'b000, {name, ": R op"});
        if (n == 2 && o == OP_JAL) check(ctrl.pc_write && ctrl.res_src == RES_ALUOUT, {name, ": jal"});
        if (n == 3 && (o == OP_RTYPE || o == OP_ITYPE || o == OP_JAL))
          check(ctrl.reg_write && ctrl.res_src == RES_ALUOUT, {name, ": ALU write-back"});
        if (n == 3 && o == OP_LOAD) check(ctrl.adr_src && !ctrl.reg_write, {name, ": mem read"});
        if (n == 4 && o == OP_STORE) check(ctrl.mem_write && ctrl.adr_src, {name, ": mem write"});
        if (n == 4 && o == OP_LOAD) check(!ctrl.mem_write && ctrl.adr_src, {name, ": second read cycle"});
        if (n == 5) check(ctrl.reg_write && ctrl.res_src == RES_DATA, {name, ": mem write-back"});
        if (n != 4) check(!ctrl.mem_write, {name, ": no stray memory write"});
        n++;
      end
    end while (z != 0 && n < 10);
    check(n == exp_states, $sformatf("%s: %0d states, expected %0d", name, n, exp_states));
  endtask

  initial begin
    op = OP_ITYPE; funct3 = '0; funct7_5 = 1'b0; zero = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    repeat (3) begin
      zero = 1'b0; run_instr(OP_BRANCH, 3'b000, 1'b0, 3, "beq not taken");
      zero = 1'b1; run_instr(OP_BRANCH, 3'b000, 1'b0, 3, "beq taken");
      run_instr(OP_RTYPE, 3'b000, 1'b1, 4, "sub");
      run_instr(OP_RTYPE, 3'b111, 1'b0, 4, "and");
      run_instr(OP_ITYPE, 3'b000, 1'b0, 4, "addi");
      run_instr(OP_JAL,   3'b000, 1'b0, 4, "jal");
      run_instr(OP_STORE, 3'b010, 1'b0, 5, "sw");
      run_instr(OP_LOAD,  3'b010, 1'b0, 6, "lw");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
