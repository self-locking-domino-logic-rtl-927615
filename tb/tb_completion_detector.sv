// tb_completion_detector: self-checking test of the completion detector.
//
// Random valid dual-rail words must give en = 1; all-precharged rails, one
// gate still empty (both rails 0) or one gate with both rails 1 must give 0.
module tb_completion_detector;
  localparam int W = 32;
  logic [W-1:0] f, f_n;
  logic en;
  int checks = 0, failures = 0;

  completion_detector #(.W(W)) dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    f = '0; f_n = '0; #1;
    check(en == 1'b0, "precharged word");
    for (int i = 0; i < 200; i++) begin
      int unsigned pos;
      f = $urandom(); f_n = ~f; #1;
      check(en == 1'b1, "valid word complete");
      pos = $urandom_range(W-1);
      f[pos] = 1'b0; f_n[pos] = 1'b0; #1;
      check(en == 1'b0, $sformatf("bit %0d still switching", pos));
      f[pos] = 1'b1; f_n[pos] = 1'b1; #1;
      check(en == 1'b0, $sformatf("bit %0d both rails", pos));
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
