// tb_domino_alu: self-checking test of the self-locking domino ALU.
//
// Runs random and corner operands through every operation with the
// request/acknowledge handshake and compares the result and the zero flag
// with values computed here.  Checks the handshake timing (ack returns
// 2*DELTA+2 clk edges after the edge that accepted the request), that en is
// low during precharge, and that the output register f_q holds the previous
// result after the next request.
module tb_domino_alu;
  import slp_pkg::*;
  localparam int unsigned XLEN = 32, DELTA = 2;

  logic clk = 1'b0, rst_n = 1'b0, req = 1'b0;
  logic [XLEN-1:0] a, b, result, f_q;
  alu_op_e alu_ctrl;
  logic zero, en, ack, dc_n;
  int checks = 0, failures = 0;
  logic [XLEN-1:0] prev_expect;

  domino_alu #(.XLEN(XLEN), .DELTA(DELTA)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", msg, $time);
    end
  endtask

  function automatic logic [XLEN-1:0] model(alu_op_e op, logic [XLEN-1:0] x, logic [XLEN-1:0] y);
    case (op)
      ALU_ADD: return x + y;
      ALU_SUB: return x - y;
      ALU_AND: return x & y;
      ALU_OR:  return x | y;
      ALU_XOR: return x ^ y;
      default: return ($signed(x) < $signed(y)) ? 1 : 0;
    endcase
  endfunction

  task automatic run(alu_op_e op, logic [XLEN-1:0] x, logic [XLEN-1:0] y);
    logic [XLEN-1:0] exp;
    int edges;
    bit saw_pre;
    exp = model(op, x, y);
    check(ack == 1'b1, "ALU ready before request");
    a = x; b = y; alu_ctrl = op; req = 1'b1;
    @(posedge clk); #1;
    req = 1'b0;
    edges = 1;
    saw_pre = 1'b0;
    check(f_q == prev_expect, "output register holds previous result");
    while (!ack && edges < 50) begin
      if (!dc_n) begin
        saw_pre = 1'b1;
        check(en == 1'b0, "en low in precharge");
      end else if (saw_pre) begin
        a = $urandom(); b = $urandom();   // operands captured: changes must not matter
      end
      @(posedge clk); #1;
      edges++;
    end
    check(saw_pre, "precharge phase seen");
    check(edges == 2*DELTA + 2, $sformatf("ack latency %0d edges", edges));
    check(result == exp, $sformatf("op %s %h,%h -> %h expected %h", op.name(), x, y, result, exp));
    check(zero == (exp == '0), "zero flag");
    prev_expect = exp;
  endtask

  alu_op_e ops [6] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SLT};

  initial begin
    a = '0; b = '0; alu_ctrl = ALU_ADD; prev_expect = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    // corners
    run(ALU_ADD, 32'hFFFF_FFFF, 32'h1);
    run(ALU_SUB, 32'h5, 32'h5);
    run(ALU_SUB, 32'h0, 32'h1);
    run(ALU_SLT, 32'h8000_0000, 32'h7FFF_FFFF);
    run(ALU_SLT, 32'h7FFF_FFFF, 32'h8000_0000);
    run(ALU_SLT, 32'hFFFF_FFFE, 32'hFFFF_FFFF);
    run(ALU_SLT, 32'h5, 32'h5);
    run(ALU_AND, 32'hF0F0_F0F0, 32'hFF00_FF00);
    // random
    for (int i = 0; i < 300; i++)
      run(ops[i % 6], $urandom(), (i % 7 == 0) ? 32'h0 : $urandom());
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
