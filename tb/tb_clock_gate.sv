// tb_clock_gate: checks the latch-based clock gate: the gated clock follows
// the clock while 'en' (or 'test_en') is high, stays low otherwise, and an
// enable change while the clock is high does not cut or create a pulse
// (no glitch: every gated high phase is a full clock high phase).
module tb_clock_gate;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin #2000000; $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic en = 0, test_en = 0, gclk;
  clock_gate dut (.clk, .en, .test_en, .gclk);

  int pulses = 0;
  realtime rise;
  always @(posedge gclk) begin rise = $realtime; pulses++; end
  always @(negedge gclk) if (pulses > 0) check($realtime - rise == 5.0, $sformatf("gated pulse width %0t", $realtime - rise));

  initial begin
    int p0;
    bit e;
    // changes at random times, also in the clock's high phase
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      e = $urandom_range(0, 1);
      en = e; test_en = (t % 50 > 40);
      p0 = pulses;
      #($urandom_range(1, 4));
      @(posedge clk); #1;
      check(pulses - p0 == int'(e || test_en), $sformatf("cycle %0d: %0d pulses with en=%0d test_en=%0d", t, pulses - p0, e, test_en));
      #($urandom_range(0, 3));
      en = $urandom_range(0, 1);        // glitch attempt while clk is high
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
