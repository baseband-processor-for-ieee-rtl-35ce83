// tb_baseband_top: end-to-end test of the baseband processor.
// 1. Transmits a frame (LENGTH bytes at a given rate) and captures the DAC
//    samples. 2. Feeds them back into the receiver with a carrier frequency
//    offset applied here, preceded and followed by silence, and checks that
//    the decoded RATE, LENGTH and bytes equal what was sent. This is repeated
//    for several rates. 3. Runs the transmitter and receiver BIST and checks
//    the Bist_ok reporting. Every mechanism (clock-domain switching, frame
//    detection, timing, decision-directed updates, BIST pulses) is counted and
//    must have happened at least once.
module tb_baseband_top;
  import bb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  logic        tx_req = 0, tx_byte_valid = 0, tx_byte_ready, tx_done;
  logic [3:0]  tx_rate = 4'b1101;
  logic [11:0] tx_length = 0;
  logic [7:0]  tx_byte = 0;
  logic        tx_out_valid, rx_in_valid = 0;
  cplx_t       tx_out_data, rx_in_data = '0;
  logic        rx_byte_valid, rx_done, rx_fail, bist_start = 0, bist_sel = 0, bist_ok, bist_busy;
  logic [7:0]  rx_byte;
  logic [3:0]  rx_rate, clk_en;
  logic [11:0] rx_length;
  logic        tx_mode, tx_underrun, rx_timing_found, rx_h_update;

  baseband_top dut (
    .clk, .rst_n, .tx_req, .tx_rate, .tx_length, .tx_seed(7'h5d), .tx_byte_valid, .tx_byte_ready,
    .tx_byte, .tx_done, .tx_out_valid, .tx_out_data, .rx_in_valid, .rx_in_data, .rx_byte_valid,
    .rx_byte, .rx_rate, .rx_length, .rx_done, .rx_fail, .bist_start, .bist_sel, .bist_ok,
    .bist_busy, .clk_en, .tx_mode, .tx_underrun, .rx_timing_found, .rx_h_update);

  int checks = 0, failures = 0;
  int n_tx_gate = 0, n_proc_gate = 0, n_detect = 0, n_timing = 0, n_hupd = 0, n_underrun = 0;
  int n_bist_pulse = 0, n_mode_sw = 0;
  logic tx_mode_d = 0, tf_d = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (clk_en[0]) n_tx_gate++;
    if (clk_en[3]) n_proc_gate++;
    if (dut.detected && dut.u_pwr.mode == 0) n_detect++;
    if (rx_timing_found && !tf_d) n_timing++;
    tf_d <= rx_timing_found;
    if (rx_h_update) n_hupd++;
    if (tx_underrun) n_underrun++;
    if (tx_mode != tx_mode_d) n_mode_sw++;
    tx_mode_d <= tx_mode;
  end

  cplx_t  cap [$];
  logic [7:0] sent [$];
  logic [7:0] got [$];

  always @(posedge clk) begin
    if (tx_out_valid) cap.push_back(tx_out_data);
    if (rx_byte_valid) got.push_back(rx_byte);
  end

  task automatic transmit(input logic [3:0] rate, input int len);
    int sent_n;
    cap.delete(); sent.delete();
    for (int i = 0; i < len; i++) sent.push_back(8'($urandom));
    @(posedge clk);
    tx_rate <= rate; tx_length <= 12'(len); tx_req <= 1;
    @(posedge clk); tx_req <= 0;
    sent_n = 0;
    while (!tx_done) begin
      tx_byte_valid <= (sent_n < len);
      tx_byte <= (sent_n < len) ? sent[sent_n] : 8'h00;
      @(posedge clk);
      if (tx_byte_valid && tx_byte_ready) sent_n++;
    end
    tx_byte_valid <= 0;
    @(posedge clk);
  endtask

  task automatic receive(input real cfo_hz, input logic [3:0] rate, input int len);
    real ph, w, c, s;
    int  n;
    got.delete();
    ph = 0.0; w = 2.0 * PI * cfo_hz / 20.0e6;
    n = 0;
    for (int i = 0; i < 120 + cap.size() + 400; i++) begin
      cplx_t v;
      v = '0;
      if (i >= 120 && i < 120 + cap.size()) v = cap[i-120];
      c = $cos(ph); s = $sin(ph);
      rx_in_data.re <= rnd(v.re * c - v.im * s);
      rx_in_data.im <= rnd(v.re * s + v.im * c);
      ph = ph + w;
      rx_in_valid <= 1;
      @(posedge clk); rx_in_valid <= 0;
      repeat (3) @(posedge clk);
      if (i > 520 && (rx_done || rx_fail)) n++;   // flags from the previous frame stay up until detection
      if (n > 4) break;
    end
    repeat (50) @(posedge clk);
    check(rx_done && !rx_fail, $sformatf("frame received (done=%0d fail=%0d)", rx_done, rx_fail));
    check(rx_rate == rate, $sformatf("RATE %b, expected %b", rx_rate, rate));
    check(rx_length == 12'(len), $sformatf("LENGTH %0d, expected %0d", rx_length, len));
    check(got.size() == len, $sformatf("%0d bytes received, expected %0d", got.size(), len));
    for (int i = 0; i < len && i < got.size(); i++)
      check(got[i] == sent[i], $sformatf("byte %0d: %h, expected %h", i, got[i], sent[i]));
  endtask

  task automatic frame(input logic [3:0] rate, input int len, input real cfo);
    int nsym, ndbps;
    ndbps = rate_info(rate).ndbps;
    nsym = (22 + 8 * len + ndbps - 1) / ndbps;
    transmit(rate, len);
    check(cap.size() == 320 + 80 * (nsym + 1),
          $sformatf("rate %b: %0d samples sent, expected %0d", rate, cap.size(), 320 + 80 * (nsym + 1)));
    receive(cfo, rate, len);
    $display("frame rate=%b len=%0d cfo=%0.0f Hz: %0d samples, %0d bytes back", rate, len, cfo, cap.size(), got.size());
  endtask

  task automatic bist(input bit sel, output int pulses, output bit level);
    pulses = 0;
    @(posedge clk); bist_sel <= sel; bist_start <= 1;
    @(posedge clk); bist_start <= 0;
    repeat (2) @(posedge clk);
    while (bist_busy) begin
      @(posedge clk);
      if (bist_ok) pulses++;
    end
    repeat (3) @(posedge clk);
    level = bist_ok;
    n_bist_pulse += pulses;
    $display("BIST %s: %0d pulses, level %0d, signatures %h %h %h %h", sel ? "rx" : "tx", pulses, level,
             sel ? dut.u_rx_bist.sig[0] : dut.u_tx_bist.sig[0], sel ? dut.u_rx_bist.sig[1] : dut.u_tx_bist.sig[1],
             sel ? dut.u_rx_bist.sig[2] : dut.u_tx_bist.sig[2], sel ? dut.u_rx_bist.sig[3] : dut.u_tx_bist.sig[3]);
  endtask

  initial begin
    int p; bit lv;
    #2 rst_n = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    frame(4'b1101, 10, 50.0e3);     //  6 Mbit/s
    frame(4'b1011, 40, -120.0e3);   // 36 Mbit/s
    frame(4'b0011, 60, 200.0e3);    // 54 Mbit/s
    frame(4'b0111, 25, 0.0);        // 18 Mbit/s
    // transceiver scenario: a 43-byte frame, then the 14-byte acknowledge
    frame(4'b1101, 43, 80.0e3);
    frame(4'b1101, 14, 0.0);
    bist(1'b0, p, lv);
    check(p == 3 && lv, "transmitter BIST passes");
    bist(1'b1, p, lv);
    check(p == 3 && lv, "receiver BIST passes");
    check(n_tx_gate > 0 && n_proc_gate > 0, "transmit and receive domains were clocked");
    check(n_mode_sw >= 2, "mode switches between transmit and receive");
    check(n_detect > 0, "plateau detection fired");
    check(n_timing > 0, "symbol timing found");
    check(n_hupd > 0, "decision-directed channel updates");
    check(n_bist_pulse > 0, "Bist_ok pulses seen");
    check(n_underrun == 0, "no transmit underrun");
    $display("events: tx_gate=%0d proc_gate=%0d detect=%0d timing=%0d h_updates=%0d mode_switches=%0d bist_pulses=%0d",
             n_tx_gate, n_proc_gate, n_detect, n_timing, n_hupd, n_mode_sw, n_bist_pulse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
