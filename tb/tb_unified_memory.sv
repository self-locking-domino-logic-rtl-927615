// tb_unified_memory: self-checking test of the instruction/data memory.
//
// Loads words through the loader port, writes others through the data port,
// and checks both read ports against a shadow array, including the two-cycle
// read latency (data not yet there after one cycle when it changed).
module tb_unified_memory;
  localparam int unsigned WORDS = 1024;
  logic clk = 1'b0;
  logic [31:0] iaddr, idata, daddr, dwdata, drdata, prog_addr, prog_wdata;
  logic dwe = 1'b0, prog_we = 1'b0;
  logic [31:0] shadow [WORDS];
  int checks = 0, failures = 0;

  unified_memory #(.WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    for (int i = 0; i < WORDS; i++) shadow[i] = '0;
    iaddr = '0; daddr = '0; dwdata = '0; prog_addr = '0; prog_wdata = '0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = i; prog_wdata = $urandom();
      shadow[i] = prog_wdata;
    end
    @(negedge clk) prog_we = 1'b0;
    for (int i = 0; i < 600; i++) begin
      int unsigned wi, ri;
      @(negedge clk);
      wi = $urandom_range(WORDS-1);
      ri = $urandom_range(WORDS-1);
      dwe = ($urandom_range(1) == 1);
      daddr = wi * 4; dwdata = $urandom();
      iaddr = ri * 4;
      @(posedge clk); #1;
      if (dwe) shadow[wi] = dwdata;
      dwe = 1'b0;
      @(posedge clk); #1;
      check(idata == shadow[ri], $sformatf("instruction port word %0d", ri));
      @(posedge clk); #1;
      check(drdata == shadow[wi], $sformatf("data port word %0d after write", wi));
      // one cycle after a new address the old word is still on the port
      iaddr = (ri ^ 1) * 4;
      @(posedge clk); #1;
      if (shadow[ri] != shadow[ri ^ 1])
        check(idata == shadow[ri], "instruction port latency is two cycles");
      @(posedge clk); #1;
      check(idata == shadow[ri ^ 1], "instruction port after two cycles");
    end
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
