// tb_pulse_circuit: self-checking test of the self-locking pulse circuit.
//
// Fires the circuit with a one-cycle request and checks, edge by edge against
// a counting model, that Q (= dc_n) is low for DELTA+1 cycles (precharge),
// then high, and that the circuit reports ready again only 2*DELTA+1 edges
// after firing.  Also checks that a request is ignored while En is low, that
// a request held high through the lock-out does not re-fire early, and
// Y = P and En.
module tb_pulse_circuit;
  localparam int unsigned DELTA = 2;
  logic clk = 1'b0, rst_n = 1'b0, p = 1'b0, en = 1'b1;
  logic y, q, dq, dc_n, ready, fall_next, rise_next;
  int checks = 0, failures = 0;

  pulse_circuit #(.DELTA(DELTA)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", msg, $time);
    end
  endtask

  // After the firing edge (k = 0), Q is low for k = 0..DELTA, ready from 2*DELTA+1
  task automatic check_after_fire(input bit hold_p);
    for (int k = 0; k <= 3*DELTA + 2; k++) begin
      @(posedge clk); #1;
      if (k == 0 && !hold_p) p = 1'b0;
      check(q == (k > DELTA), $sformatf("Q at k=%0d", k));
      check(dc_n == q, "dc_n follows Q");
      if (hold_p) begin
        // a held request re-fires as soon as the circuit is ready
        if (k == 2*DELTA + 1) begin
          check(ready == 1'b1, "ready again at 2*DELTA+1");
          break;
        end
      end else begin
        check(ready == (k >= 2*DELTA + 1), $sformatf("ready at k=%0d", k));
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    check(q && ready && dc_n, "idle after reset: evaluate phase, ready");

    // Y = P and En
    en = 1'b1; p = 1'b0; #1 check(y == 1'b0, "Y with P=0");
    p = 1'b1; #1 check(y == 1'b1, "Y with P=1 En=1");
    en = 1'b0; #1 check(y == 1'b0, "Y with En=0");

    // request while En is low is ignored
    repeat (3) begin
      @(posedge clk); #1;
      check(q == 1'b1, "no fire while En=0");
    end
    p = 1'b0; en = 1'b1;

    // single request pulse
    p = 1'b1; #1;
    check(fall_next == 1'b1, "fall_next announced");
    check_after_fire(1'b0);

    // request held through lock-out: second fire only when ready
    @(posedge clk); #1;
    p = 1'b1;
    check_after_fire(1'b1);
    // it fires at the next edge (ready was high with P high)
    @(posedge clk); #1;
    check(q == 1'b0, "held request fires once ready");
    p = 1'b0;
    repeat (3*DELTA + 3) @(posedge clk);
    #1 check(q && ready, "back to idle");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
