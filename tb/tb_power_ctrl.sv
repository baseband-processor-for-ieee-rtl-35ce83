// tb_power_ctrl: walks the mode controller through search -> receive ->
// search -> transmit -> search, with a transmit request and a detection at
// the same time, and checks the domain enables of each mode, that every
// start pulse lasts exactly one cycle in the first cycle of its mode, and
// that an end or detect signal still high from the previous mode is not
// taken in that first cycle.
module tb_power_ctrl;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin #2000000; $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic tx_req, tx_end, detected, rx_end;
  logic en_tx, en_fft, en_trk, en_proc, tx_start, proc_start, trk_restart, tx_mode;
  power_ctrl dut (.clk, .rst_n, .tx_req, .tx_end, .detected, .rx_end, .en_tx, .en_fft, .en_trk, .en_proc,
    .tx_start, .proc_start, .trk_restart, .tx_mode);

  // expected enables {tx, fft, trk, proc} per mode: 0 search, 1 receive, 2 transmit
  function automatic logic [3:0] en_of(input int m);
    return (m == 0) ? 4'b0010 : (m == 1) ? 4'b0101 : 4'b1100;
  endfunction

  task automatic expect_mode(input int m, input string what);
    check({en_tx, en_fft, en_trk, en_proc} == en_of(m), $sformatf("%s: enables %b", what, {en_tx, en_fft, en_trk, en_proc}));
    check(tx_mode == (m == 2), $sformatf("%s: tx_mode", what));
  endtask

  task automatic step(output logic [2:0] pulses);
    @(posedge clk); #1;
    pulses = {tx_start, proc_start, trk_restart};
  endtask

  initial begin
    logic [2:0] p;
    tx_req = 0; tx_end = 0; detected = 0; rx_end = 0;
    #2 rst_n = 0; #20 rst_n = 1;
    step(p); step(p);
    expect_mode(0, "after reset");
    check(p == 3'b000, "no pulse while idle");
    // detection -> receive
    detected = 1; step(p);
    expect_mode(1, "detected");
    check(p == 3'b010, "proc_start in the first receive cycle");
    rx_end = 1; step(p);   // rx_end in the first receive cycle is ignored
    expect_mode(1, "rx_end in the first cycle is ignored");
    check(p == 3'b000, "single proc_start pulse");
    step(p);
    expect_mode(0, "rx_end");
    check(p == 3'b001, "trk_restart in the first search cycle");
    rx_end = 0;
    // detected still high in the first search cycle must not re-enter receive
    step(p); expect_mode(0, "old detect ignored in the first search cycle");
    detected = 0;
    step(p); expect_mode(0, "idle");
    // transmit request wins over a detection in the same cycle
    tx_req = 1; detected = 1; step(p);
    tx_req = 0; detected = 0;
    expect_mode(2, "tx_req");
    check(p == 3'b100, "tx_start in the first transmit cycle");
    tx_end = 1; step(p);
    expect_mode(2, "tx_end in the first cycle is ignored");
    step(p);
    expect_mode(0, "tx_end");
    tx_end = 0;
    repeat (3) begin step(p); check(p == 3'b000, "single-cycle pulses"); end
    expect_mode(0, "back in search");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
