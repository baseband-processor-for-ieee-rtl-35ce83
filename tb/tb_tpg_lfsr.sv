// tb_tpg_lfsr: checks the BIST pattern generator: reset and 'load' give the
// seed, 'step' low holds the state, and the sequence is maximal length
// (returns to the seed after exactly 2^16 - 1 steps, never reaching zero).
module tb_tpg_lfsr;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin #3000000; $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic load, step;
  logic [15:0] q;
  tpg_lfsr dut (.clk, .rst_n, .load, .step, .q);

  initial begin
    int period;
    bit zero;
    load = 0; step = 0;
    #2 rst_n = 0; #20 rst_n = 1;
    @(posedge clk);
    check(q == 16'hACE1, "seed after reset");
    repeat (5) @(posedge clk);
    check(q == 16'hACE1, "holds without step");
    step <= 1;
    period = 0; zero = 0;
    do begin
      @(posedge clk); #1;
      period++;
      if (q == 0) zero = 1;
    end while (q != 16'hACE1 && period < 70000);
    check(period == 65535, $sformatf("period %0d", period));
    check(!zero, "never all-zero");
    repeat (37) @(posedge clk);
    step <= 0; load <= 1; @(posedge clk); load <= 0; #1;
    check(q == 16'hACE1, "load restores the seed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
