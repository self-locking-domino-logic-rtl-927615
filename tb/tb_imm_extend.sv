// tb_imm_extend: self-checking test of the immediate generator.
//
// Builds instructions of the I, S, B and J formats from random immediates and
// checks that the generator returns the same (sign-extended) immediate.
module tb_imm_extend;
  import slp_pkg::*;
  logic [31:0] ins;
  logic [1:0] imm_src;
  logic [31:0] imm_ext;
  int checks = 0, failures = 0;

  imm_extend dut (.instr(ins[31:7]), .imm_src, .imm_ext);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    for (int i = 0; i < 500; i++) begin
      logic [31:0] r, imm;
      r = $urandom();
      // I: imm[11:0] in 31:20
      imm = {{20{r[11]}}, r[11:0]};
      ins = {r[11:0], 13'($urandom()), 7'b0010011}; imm_src = IMM_I; #1;
      check(imm_ext == imm, $sformatf("I imm %h got %h", imm, imm_ext));
      // S: imm[11:5] in 31:25, imm[4:0] in 11:7
      ins = {r[11:5], 13'($urandom()), r[4:0], 7'b0100011}; imm_src = IMM_S; #1;
      check(imm_ext == imm, $sformatf("S imm %h got %h", imm, imm_ext));
      // B: imm[12|10:5] in 31:25, imm[4:1|11] in 11:7
      imm = {{19{r[12]}}, r[12:1], 1'b0};
      ins = {r[12], r[10:5], 13'($urandom()), r[4:1], r[11], 7'b1100011}; imm_src = IMM_B; #1;
      check(imm_ext == imm, $sformatf("B imm %h got %h", imm, imm_ext));
      // J: imm[20|10:1|11|19:12] in 31:12
      imm = {{11{r[20]}}, r[20:1], 1'b0};
      ins = {r[20], r[10:1], r[11], r[19:12], 5'($urandom()), 7'b1101111}; imm_src = IMM_J; #1;
      check(imm_ext == imm, $sformatf("J imm %h got %h", imm, imm_ext));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
