// tb_step_sequencer: self-checking test of the handshake sequencer.
//
// Small models of the controller and the ALU answer the requests with
// acknowledge delays chosen at random.  The test checks that a state with
// uses_alu = 1 starts exactly one ALU handshake before its commit, a state
// without it none, that commit is one cycle long and comes only after the
// acknowledges, and that run = 0 stops the sequence.
module tb_step_sequencer;
  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic ctrl_ack, uses_alu, alu_ack, ctrl_req, alu_req, commit;
  int checks = 0, failures = 0;

  step_sequencer dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", msg, $time);
    end
  endtask

  // handshake partner: ack high when idle; a request takes it low for d cycles
  int c_busy = 0, a_busy = 0;
  int c_fires = 0, a_fires = 0;
  assign ctrl_ack = (c_busy == 0);
  assign alu_ack  = (a_busy == 0);

  always @(posedge clk) begin
    if (c_busy > 0) c_busy <= c_busy - 1;
    else if (ctrl_req && rst_n) begin c_busy <= 1 + $urandom_range(6); c_fires <= c_fires + 1; end
    if (a_busy > 0) a_busy <= a_busy - 1;
    else if (alu_req && rst_n) begin a_busy <= 1 + $urandom_range(6); a_fires <= a_fires + 1; end
  end

  initial begin
    uses_alu = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    run = 1'b1;
    for (int s = 0; s < 200; s++) begin
      int c0, a0, n;
      bit ua;
      ua = ($urandom_range(1) == 1);
      c0 = c_fires; a0 = a_fires;
      n = 0;
      // wait for the commit of this state
      do begin
        @(posedge clk); #1;
        if (c_fires == c0 + 1 && !commit) uses_alu = ua;   // state known after request
        n++;
      end while (!commit && n < 100);
      check(commit, "commit reached");
      check(c_fires == c0 + 1, "one controller handshake per state");
      check(a_fires == a0 + (ua ? 1 : 0), $sformatf("ALU handshakes %0d for uses_alu=%0d", a_fires - a0, ua));
      check(ctrl_ack && (!ua || alu_ack), "commit only after acknowledges");
      @(posedge clk); #1;
      check(!commit, "commit lasts one cycle");
      uses_alu = 1'b0;
    end
    run = 1'b0;
    repeat (60) @(posedge clk);
    begin
      int c0;
      c0 = c_fires;
      repeat (40) @(posedge clk);
      check(c_fires == c0, "no requests with run = 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
