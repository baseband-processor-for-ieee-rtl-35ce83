// tb_sync_fifo: random pushes and pops against a queue model, checking
// data order, level, full/empty handshakes and the synchronous clear.
module tb_sync_fifo;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin #2000000; $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic clear, iv, ir, ov, ordy;
  logic [7:0] id, od;
  logic [6:0] level;
  sync_fifo dut (.clk, .rst_n, .clear, .in_valid(iv), .in_ready(ir), .in_data(id), .out_valid(ov),
    .out_ready(ordy), .out_data(od), .level);

  initial begin
    logic [7:0] q [$];
    bit saw_full;
    clear = 0; iv = 0; id = 0; ordy = 0;
    #2 rst_n = 0; #20 rst_n = 1;
    saw_full = 0;
    for (int t = 0; t < 3000; t++) begin
      // phases: fill (mostly push), drain (mostly pop), mixed
      iv <= (t % 1000 < 400) ? ($urandom_range(0, 9) != 0) : (t % 1000 < 700) ? ($urandom_range(0, 9) == 0) : $urandom_range(0, 1);
      ordy <= (t % 1000 < 400) ? ($urandom_range(0, 9) == 0) : (t % 1000 < 700) ? ($urandom_range(0, 9) != 0) : $urandom_range(0, 1);
      id <= 8'($urandom);
      clear <= (t == 2500);
      @(posedge clk);
      check(level == 7'(q.size()), $sformatf("level %0d, model %0d", level, q.size()));
      check(ir == (q.size() < 64), "in_ready is not full");
      check(ov == (q.size() > 0), "out_valid is not empty");
      if (q.size() == 64) saw_full = 1;
      if (clear) q.delete();
      else begin
        if (ov && ordy) begin
          check(od == q[0], $sformatf("data %h, expected %h", od, q[0]));
          void'(q.pop_front());
        end
        if (iv && ir) q.push_back(id);
      end
    end
    check(saw_full, "buffer reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
