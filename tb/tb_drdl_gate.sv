// tb_drdl_gate: self-checking test of the dual-rail domino gate.
//
// For the default 5-input AND and for a 3-input XOR table it checks every
// input vector: both rails 0 in precharge (dc_n = 0); in evaluation exactly
// one rail high, F equal to the function computed here independently.
module tb_drdl_gate;
  logic dc_n;
  logic [4:0] x5;
  logic [2:0] x3;
  logic f5, f5_n, f3, f3_n;
  int checks = 0, failures = 0;

  drdl_gate dut_and (.dc_n, .x(x5), .f(f5), .f_n(f5_n));
  drdl_gate #(.N(3), .FUNC(8'b1001_0110)) dut_xor (.dc_n, .x(x3), .f(f3), .f_n(f3_n));

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    for (int v = 0; v < 32; v++) begin
      x5 = 5'(v); x3 = 3'(v);
      dc_n = 1'b0; #1;
      check(!f5 && !f5_n, "AND precharge");
      check(!f3 && !f3_n, "XOR precharge");
      dc_n = 1'b1; #1;
      check(f5 == (v == 31), $sformatf("AND F for %0d", v));
      check(f5_n == (v != 31), $sformatf("AND F-bar for %0d", v));
      check(f3 == ^x3 && f3_n == ~^x3, $sformatf("XOR rails for %0d", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
