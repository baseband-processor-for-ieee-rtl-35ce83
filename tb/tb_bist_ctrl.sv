// tb_bist_ctrl: self-checking test of the BIST reporting controller with
// its default expected signatures (all zero). Zero tap data keeps every
// signature register at zero, so a test with zero data must match on all
// four taps; putting nonzero data on chosen taps makes exactly those
// signatures differ. For 200 random tests the TB picks which taps get
// nonzero data, also drives nonzero data while 'run' or 'tap_valid' is low
// (it must be ignored), and then checks: the number of one-cycle 'bist_ok'
// pulses equals the number of matching internal taps (0..2 of taps 0..2,
// one per two-cycle slot), 'busy' covers start to the report's end, and the
// final 'bist_ok' level equals the output tap's match until the next start.
module tb_bist_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask
  initial begin #50_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic start, run, done, busy, ok;
  logic [3:0] tv;
  logic [31:0] td [4];
  logic [15:0] sig [4];
  bist_ctrl dut (.clk, .rst_n, .start, .run, .test_done(done), .tap_valid(tv), .tap_data(td),
                 .busy, .bist_ok(ok), .sig);

  initial begin
    logic [3:0] bad;
    int pulses, want, len, prev_ok, wait_cycles;
    start = 0; run = 0; done = 0; tv = '0;
    for (int i = 0; i < 4; i++) td[i] = '0;
    #22 rst_n = 1;
    @(negedge clk);
    check(!busy && !ok, "idle after reset");
    for (int t = 0; t < 200; t++) begin
      bad = 4'($urandom_range(0, 15));
      start = 1; @(negedge clk); start = 0;
      check(busy && !ok, "busy and bist_ok low after start");
      run = 1;
      len = $urandom_range(5, 60);
      for (int c = 0; c < len; c++) begin
        for (int i = 0; i < 4; i++) begin
          tv[i] = $urandom_range(0, 1);
          td[i] = (bad[i] || !tv[i]) ? $urandom() | 32'h1 : 32'h0;
        end
        if (c == len / 2) begin run = 0; @(negedge clk); run = 1; end   // data with run low is ignored
        @(negedge clk);
      end
      // make sure every bad tap saw at least one nonzero valid word
      for (int i = 0; i < 4; i++) begin tv[i] = bad[i]; td[i] = bad[i] ? 32'hdead_beef : '0; end
      @(negedge clk);
      run = 0; tv = '0;
      for (int i = 0; i < 4; i++) check((sig[i] != 0) == bad[i], $sformatf("test %0d: signature %0d is %h", t, i, sig[i]));
      done = 1; @(negedge clk); done = 0;
      pulses = 0; prev_ok = 0; wait_cycles = 0;
      while (busy && wait_cycles < 20) begin
        if (ok) begin
          pulses++;
          check(!prev_ok, "pulses last one cycle");
        end
        prev_ok = ok;
        wait_cycles++;
        @(negedge clk);
      end
      want = 3 - bad[0] - bad[1] - bad[2];
      check(!busy, "report finishes");
      check(pulses == want, $sformatf("test %0d (bad %b): %0d pulses, expected %0d", t, bad, pulses, want));
      repeat ($urandom_range(2, 6)) begin
        @(negedge clk);
        check(ok == !bad[3], $sformatf("test %0d: final level %0b for output tap bad=%0b", t, ok, bad[3]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
