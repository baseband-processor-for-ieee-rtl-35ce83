// tb_guard_insert: sends random 64-sample symbols (with random input gaps
// and output backpressure) and checks that each comes out as 80 samples:
// samples 48..63 as the cyclic prefix, then samples 0..63, with out_last
// on the final sample of a tagged symbol only.
module tb_guard_insert;
  import bb_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin #3000000; $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic iv, ir, itag, ov, ordy, ol;
  cplx_t id, od;
  guard_insert dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_data(id), .in_tag(itag),
    .out_valid(ov), .out_ready(ordy), .out_data(od), .out_last(ol));

  localparam int NSYM = 10;
  cplx_t x [NSYM][64];
  bit    stag [NSYM];
  int si = 0, sp = 0;
  always @(posedge clk) if (rst_n) begin
    int s, p;
    bit go;
    s = si; p = sp;
    if (iv && ir) begin p++; if (p == 64) begin p = 0; s++; end end
    si <= s; sp <= p;
    go = (s < NSYM) && ($urandom_range(0, 4) != 0);
    iv   <= go;
    id   <= (s < NSYM) ? x[s][p] : '0;
    itag <= (s < NSYM) && stag[s];
  end
  always @(posedge clk) ordy <= ($urandom_range(0, 3) != 0);

  initial begin
    int oi, op, n;
    iv = 0; id = '0; itag = 0;
    for (int s = 0; s < NSYM; s++) begin
      stag[s] = (s % 3 == 2);
      for (int p = 0; p < 64; p++) x[s][p] = cplx_t'($urandom);
    end
    #2 rst_n = 0; #20 rst_n = 1;
    oi = 0; op = 0;
    while (oi < NSYM) begin
      @(posedge clk);
      if (ov && ordy) begin
        n = (op < 16) ? op + 48 : op - 16;
        check(od == x[oi][n], $sformatf("symbol %0d output %0d", oi, op));
        check(ol == (stag[oi] && op == 79), $sformatf("symbol %0d last flag at %0d", oi, op));
        op++;
        if (op == 80) begin op = 0; oi++; end
      end
    end
    repeat (10) @(posedge clk);
    check(!ov, "no extra output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
