// tb_fft64: runs random symbols through both directions and compares with
// a direct DFT computed in real arithmetic.
//   FFT : input samples n = 0..63, output bins k = -32..31, unscaled.
//   IFFT: input bins k = -32..31, output samples n = 0..63, scaled by 1/64.
// Directions alternate symbol by symbol. The test also checks the tag and
// direction that travel with each symbol, the out_first marker, random
// output backpressure, and the throughput: with the output always ready, a
// new symbol may start every 257 clocks (64 out + 192 butterflies + 1).
module tb_fft64;
  import bb_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin #3000000; $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic iv, ir, inv, tag, ov, ordy, ofirst, otag, oinv, busy;
  cplx_t id, od;
  fft64 dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_data(id), .in_inv(inv), .in_tag(tag),
    .out_valid(ov), .out_ready(ordy), .out_data(od), .out_first(ofirst), .out_tag(otag), .out_inv(oinv), .busy);

  localparam int NSYM = 12;
  cplx_t x [NSYM][64];
  bit    sym_inv [NSYM];
  bit    sym_tag [NSYM];
  bit    stall = 1;
  int    sp = 0, si = 0;

  // clocked driver: symbol si, sample sp
  always @(posedge clk) if (rst_n) begin
    int s, p;
    s = si; p = sp;
    if (iv && ir) begin p++; if (p == 64) begin p = 0; s++; end end
    si <= s; sp <= p;
    iv  <= (s < NSYM);
    id  <= (s < NSYM) ? x[s][p] : '0;
    inv <= (s < NSYM) ? sym_inv[s] : 1'b0;
    tag <= (s < NSYM) ? (sym_tag[s] && p == 63) : 1'b0;
  end
  always @(posedge clk) ordy <= stall ? ($urandom_range(0, 3) != 0) : 1'b1;

  initial begin
    real er, ei, a;
    int os, oc, tol, t_first [NSYM];
    iv = 0; id = '0; inv = 0; tag = 0; ordy = 0;
    for (int s = 0; s < NSYM; s++) begin
      sym_inv[s] = s % 2; sym_tag[s] = $urandom_range(0, 1);
      for (int n = 0; n < 64; n++) begin
        // FFT input: time samples up to +-400 (sum up to 64x); IFFT input: bins up to +-12000
        x[s][n].re = sym_inv[s] ? sample_t'($signed($urandom_range(0, 24000)) - 12000) : sample_t'($signed($urandom_range(0, 800)) - 400);
        x[s][n].im = sym_inv[s] ? sample_t'($signed($urandom_range(0, 24000)) - 12000) : sample_t'($signed($urandom_range(0, 800)) - 400);
      end
    end
    #2 rst_n = 0; #20 rst_n = 1;
    for (os = 0; os < NSYM; os++) begin
      if (os == NSYM / 2) stall = 0;
      oc = 0;
      while (oc < 64) begin
        @(posedge clk);
        if (ov && ordy) begin
          if (oc == 0) t_first[os] = int'($time / 10);
          check(ofirst == (oc == 0), "out_first");
          check(oinv == sym_inv[os], $sformatf("symbol %0d direction", os));
          check(otag == sym_tag[os], $sformatf("symbol %0d tag", os));
          er = 0; ei = 0;
          for (int m = 0; m < 64; m++) begin
            if (sym_inv[os]) begin   // x indexed by bin (m - 32), output sample oc
              a = 2.0 * PI * (m - 32) * oc / 64.0;
              er += (x[os][m].re * $cos(a) - x[os][m].im * $sin(a)) / 64.0;
              ei += (x[os][m].re * $sin(a) + x[os][m].im * $cos(a)) / 64.0;
            end else begin           // x indexed by sample m, output bin oc - 32
              a = -2.0 * PI * (oc - 32) * m / 64.0;
              er += x[os][m].re * $cos(a) - x[os][m].im * $sin(a);
              ei += x[os][m].re * $sin(a) + x[os][m].im * $cos(a);
            end
          end
          tol = sym_inv[os] ? 12 : 24;
          check(od.re - er < tol && er - od.re < tol && od.im - ei < tol && ei - od.im < tol,
                $sformatf("symbol %0d (%s) out %0d: (%0d,%0d) expected (%0.1f,%0.1f)", os,
                          sym_inv[os] ? "ifft" : "fft", oc, od.re, od.im, er, ei));
          oc++;
        end
      end
    end
    // unstalled part: symbols start at most 256 clocks apart
    for (int s = NSYM / 2 + 2; s < NSYM; s++)
      check(t_first[s] - t_first[s - 1] <= 257, $sformatf("symbol spacing %0d clocks", t_first[s] - t_first[s - 1]));
    repeat (5) @(posedge clk);
    check(!busy, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
