// tb_cdiv: streams random complex divisions a / b (one per clock, with gaps)
// and compares each result with (a / b) * 8192 computed in real arithmetic,
// saturated to 16 bits, within one unit per part (the hardware truncates).
// Also checks the tag that travels with each division and the latency
// (QW + 3 = 19 clocks from the input edge to the output edge).
module tb_cdiv;
  import bb_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin #2000000; $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic iv, ov;
  cplx_t a, b, q;
  logic [7:0] itag, otag;
  cdiv dut (.clk, .rst_n, .in_valid(iv), .a, .b, .in_tag(itag), .out_valid(ov), .q, .out_tag(otag));

  typedef struct { real re, im; int t; int tag; } exp_t;
  exp_t eq [$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  function automatic real sat(input real v);
    return v > 32767.0 ? 32767.0 : v < -32768.0 ? -32768.0 : v;
  endfunction

  always @(posedge clk) if (rst_n && ov) begin
    check(eq.size() > 0, "unexpected result");
    if (eq.size() > 0) begin
      check(q.re - eq[0].re <= 1.01 && eq[0].re - q.re <= 1.01 && q.im - eq[0].im <= 1.01 && eq[0].im - q.im <= 1.01,
            $sformatf("q (%0d,%0d) expected (%0.2f,%0.2f)", q.re, q.im, eq[0].re, eq[0].im));
      check(otag == 8'(eq[0].tag), "tag");
      check(cyc - eq[0].t == 19, $sformatf("latency %0d", cyc - eq[0].t));
      void'(eq.pop_front());
    end
  end

  initial begin
    real ar, ai, br, bi, d;
    exp_t e;
    iv = 0; a = '0; b = '0; itag = 0;
    #2 rst_n = 0; #20 rst_n = 1;
    @(posedge clk);
    for (int t = 0; t < 600; t++) begin
      if ($urandom_range(0, 3) != 0) begin
        ar = $signed($urandom_range(0, 40000)) - 20000; ai = $signed($urandom_range(0, 40000)) - 20000;
        // divisors from tiny to full scale, some giving saturated results
        d = (t % 4 == 0) ? 200.0 : (t % 4 == 1) ? 2000.0 : 20000.0;
        br = $signed($urandom_range(0, 2 * int'(d))) - d; bi = $signed($urandom_range(0, 2 * int'(d))) - d;
        if (br == 0 && bi == 0) br = 1;
        a.re <= sample_t'(int'(ar)); a.im <= sample_t'(int'(ai));
        b.re <= sample_t'(int'(br)); b.im <= sample_t'(int'(bi));
        itag <= 8'(t); iv <= 1;
        e.re = sat((ar * br + ai * bi) / (br * br + bi * bi) * 8192.0);
        e.im = sat((ai * br - ar * bi) / (br * br + bi * bi) * 8192.0);
        e.t = cyc + 1; e.tag = t % 256;
        eq.push_back(e);
      end else iv <= 0;
      @(posedge clk);
    end
    iv <= 0;
    repeat (30) @(posedge clk);
    check(eq.size() == 0, $sformatf("%0d results missing", eq.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
