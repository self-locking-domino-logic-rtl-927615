// tb_cpu_delta_sweep: the processor with a short and a long precharge phase.
//
// Two copies of the CPU, with DELTA = 1 and DELTA = 5, run the same program
// (sum 10..1 in a loop, store the sum, load it back).  Both must give the
// same results, and every state of each must last 2*DELTA+4 clk cycles
// without the ALU and 4*DELTA+7 with it: a longer self-reset delay only
// stretches each handshake, the order of events is unchanged.
module tb_cpu_delta_sweep;
  import slp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0, prog_we = 1'b0;
  logic [31:0] prog_addr = '0, prog_wdata = '0;
  logic [4:0] dbg_reg = '0;
  logic [31:0] rd_a, rd_b, pc_a, pc_b;
  logic [5:0] st_a, st_b;
  logic step_a, step_b, done_a, done_b;
  int checks = 0, failures = 0;

  riscv_async_cpu #(.DELTA(1)) dut_a (.clk, .rst_n, .run, .prog_we, .prog_addr, .prog_wdata,
    .dbg_reg, .dbg_reg_data(rd_a), .pc(pc_a), .state(st_a), .step(step_a), .instr_done(done_a));
  riscv_async_cpu #(.DELTA(5)) dut_b (.clk, .rst_n, .run, .prog_we, .prog_addr, .prog_wdata,
    .dbg_reg, .dbg_reg_data(rd_b), .pc(pc_b), .state(st_b), .step(step_b), .instr_done(done_b));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", msg, $time);
    end
  endtask

  logic [31:0] prog [11] = '{
    {12'd10, 5'd0, 3'b000, 5'd1, OP_ITYPE},                        // addi x1, x0, 10
    {12'd0, 5'd0, 3'b000, 5'd2, OP_ITYPE},                         // addi x2, x0, 0
    {7'd0, 5'd1, 5'd2, 3'b000, 5'd2, OP_RTYPE},                    // loop: add x2, x2, x1
    {12'hfff, 5'd1, 3'b000, 5'd1, OP_ITYPE},                       // addi x1, x1, -1
    {1'b0, 6'd0, 5'd0, 5'd1, 3'b000, 4'd4, 1'b0, OP_BRANCH},       // beq x1, x0, +8
    {1'b1, 10'h3fa, 1'b1, 8'hff, 5'd0, OP_JAL},                    // jal x0, -12
    {7'd8, 5'd2, 5'd0, 3'b010, 5'd0, OP_STORE},                    // sw x2, 256(x0)
    {12'd256, 5'd0, 3'b010, 5'd3, OP_LOAD},                        // lw x3, 256(x0)
    {7'd32, 5'd3, 5'd2, 3'b000, 5'd4, OP_RTYPE},                   // sub x4, x2, x3
    {1'b0, 10'd0, 1'b0, 8'd0, 5'd0, OP_JAL},                       // halt: jal x0, 0
    32'h0
  };

  // state lengths
  int since_a = 0, since_b = 0, states_a = 0, states_b = 0;
  always @(posedge clk) if (run) begin
    since_a++; since_b++;
    if (step_a) begin
      if (states_a > 0)
        check(since_a == (dut_a.ctrl.uses_alu ? 4*1 + 7 : 2*1 + 4), $sformatf("DELTA=1 state %0d cycles", since_a));
      states_a++; since_a = 0;
    end
    if (step_b) begin
      if (states_b > 0)
        check(since_b == (dut_b.ctrl.uses_alu ? 4*5 + 7 : 2*5 + 4), $sformatf("DELTA=5 state %0d cycles", since_b));
      states_b++; since_b = 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (prog[i]) begin
      @(negedge clk); prog_we = 1'b1; prog_addr = i; prog_wdata = prog[i];
    end
    @(negedge clk); prog_we = 1'b0;
    run = 1'b1;
    fork
      wait (pc_a == 32'h28);
      wait (pc_b == 32'h28);
    join
    repeat (200) @(posedge clk);
    run = 1'b0;
    repeat (100) @(posedge clk);
    for (int r = 1; r <= 4; r++) begin
      dbg_reg = 5'(r); #1;
      check(rd_a == rd_b, $sformatf("x%0d equal for both DELTA", r));
    end
    dbg_reg = 2; #1 check(rd_a == 55, $sformatf("sum %0d", rd_a));
    dbg_reg = 3; #1 check(rd_a == 55, "loaded sum");
    dbg_reg = 4; #1 check(rd_a == 0, "difference");
    dbg_reg = 1; #1 check(rd_a == 0, "counter");
    check(states_a > 100 && states_b > 100, "both ran the loop");
    $display("states DELTA=1: %0d, DELTA=5: %0d", states_a, states_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
