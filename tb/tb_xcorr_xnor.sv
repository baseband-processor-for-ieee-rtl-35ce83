// tb_xcorr_xnor: feeds noise, then two long training symbols (built here
// from the standard's L(-26..26) table), rotated by a constant phase that
// changes from run to run, then noise again. Checks that the score peaks
// (>= 120 of 128) exactly when the last input sample completes a training
// symbol, that it stays below the synchronizer threshold (96) everywhere
// else, the output timing (score registered on the input edge), and 'clear'.
module tb_xcorr_xnor;
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

  logic clear, iv, ov;
  cplx_t id;
  logic [8:0] score;
  xcorr_xnor dut (.clk, .rst_n, .clear, .in_valid(iv), .in_data(id), .out_valid(ov), .score);

  // standard long training sequence, +1/-1 for k = -26..26 (0 at DC)
  localparam string LTS = "++--++-+-++++++--++-+-++++0+--++-+-+-----++--+-+-++++";
  real lr [64], li [64];

  initial begin
    real ph, a, c, s, xr, xi;
    int n_in, k;
    clear = 0; iv = 0; id = '0;
    for (int n = 0; n < 64; n++) begin
      lr[n] = 0; li[n] = 0;
      for (int kk = -26; kk <= 26; kk++) begin
        a = 2.0 * PI * kk * n / 64.0;
        c = (LTS[kk + 26] == "+") ? 1.0 : (LTS[kk + 26] == "-") ? -1.0 : 0.0;
        lr[n] += c * $cos(a); li[n] += c * $sin(a);
      end
    end
    #2 rst_n = 0; #20 rst_n = 1;
    for (int run = 0; run < 8; run++) begin
      ph = 2.0 * PI * run / 8.0 + 0.3;
      @(posedge clk); clear <= 1; @(posedge clk); clear <= 0;
      n_in = 0;
      for (int i = 0; i < 64 + 128 + 64; i++) begin
        if (i >= 64 && i < 192) begin
          k = (i - 64) % 64;
          xr = lr[k] * $cos(ph) - li[k] * $sin(ph);
          xi = lr[k] * $sin(ph) + li[k] * $cos(ph);
          id.re <= sample_t'($rtoi(xr * 300.0)); id.im <= sample_t'($rtoi(xi * 300.0));
        end else begin
          id.re <= sample_t'($signed($urandom_range(0, 16000)) - 8000);
          id.im <= sample_t'($signed($urandom_range(0, 16000)) - 8000);
        end
        iv <= 1;
        @(posedge clk); #1;          // the edge that takes the sample also updates the score
        iv <= 0;
        check(ov, "out_valid with the sample's edge");
        if (i == 127 || i == 191)
          check(score >= 120, $sformatf("run %0d: score %0d at the end of a training symbol", run, score));
        else if (i >= 64)
          check(score < 96, $sformatf("run %0d sample %0d: score %0d off the peak", run, i, score));
        @(posedge clk); #1;
        check(!ov, "out_valid is a single pulse");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
