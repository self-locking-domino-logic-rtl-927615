// tb_regfile: self-checking test of the register file.
//
// Writes random values to random registers, keeps a shadow copy, and checks
// all three read ports against it; x0 must stay 0 and writes with we = 0
// must be ignored.
module tb_regfile;
  logic clk = 1'b0, we = 1'b0;
  logic [4:0] ra1, ra2, ra3, wa;
  logic [31:0] wd, rd1, rd2, rd3;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  regfile dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    for (int i = 0; i < 32; i++) shadow[i] = '0;
    ra1 = '0; ra2 = '0; ra3 = '0; wa = '0; wd = '0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      we = ($urandom_range(3) != 0);
      wa = 5'($urandom());
      wd = $urandom();
      @(posedge clk); #1;
      if (we && wa != 0) shadow[wa] = wd;
      we = 1'b0;
      ra1 = 5'($urandom()); ra2 = 5'($urandom()); ra3 = wa; #1;
      check(rd1 == shadow[ra1], $sformatf("rd1 x%0d", ra1));
      check(rd2 == shadow[ra2], $sformatf("rd2 x%0d", ra2));
      check(rd3 == shadow[ra3], $sformatf("rd3 x%0d", ra3));
    end
    ra1 = 0; #1 check(rd1 == 0, "x0 reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
