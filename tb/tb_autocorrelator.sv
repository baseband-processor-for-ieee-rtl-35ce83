// tb_autocorrelator: self-checking test of the lag-16 delay-and-correlate
// unit with its default parameters (LAG = 16, WIN = 16, DW = 12). Random
// samples, a periodic 16-sample pattern with a carrier-offset rotation and
// full-scale values are fed with random valid gaps. A reference model keeps
// the truncated sample history and recomputes c(n) and p(n) directly as
// 16-term sums, which are compared with the registered outputs one clock
// after each valid sample. out_valid must follow in_valid by one clock, and
// clear must zero the history.
module tb_autocorrelator;
  import bb_pkg::*;
  localparam int DW = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask
  initial begin #50_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic clear, iv, ov;
  cplx_t id;
  logic signed [2*DW+5:0] cre, cim;
  logic [2*DW+5:0] p;
  autocorrelator dut (.clk, .rst_n, .clear, .in_valid(iv), .in_data(id), .out_valid(ov),
                      .c_re(cre), .c_im(cim), .p);

  longint hr [$], hi [$];   // truncated history, [0] newest

  task automatic push(int re, int im);
    hr.push_front(longint'($signed(16'(re)) >>> (16 - DW)));
    hi.push_front(longint'($signed(16'(im)) >>> (16 - DW)));
    if (hr.size() > 32) begin void'(hr.pop_back()); void'(hi.pop_back()); end
  endtask

  task automatic model(output longint mr, output longint mi, output longint mp);
    longint xr, xi, yr, yi;
    mr = 0; mi = 0; mp = 0;
    for (int i = 0; i < 16; i++) begin
      xr = (i < hr.size()) ? hr[i] : 0;           xi = (i < hi.size()) ? hi[i] : 0;
      yr = (i + 16 < hr.size()) ? hr[i + 16] : 0; yi = (i + 16 < hi.size()) ? hi[i + 16] : 0;
      mr += xr * yr + xi * yi;
      mi += xi * yr - xr * yi;
      mp += yr * yr + yi * yi;
    end
  endtask

  initial begin
    int re, im;
    longint mr, mi, mp;
    real ph;
    clear = 0; iv = 0; id = '0;
    #22 rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 6000; n++) begin
      if (n == 3000) begin
        clear = 1; @(negedge clk); clear = 0;
        check(!ov && cre == 0 && cim == 0 && p == 0, "clear zeroes the outputs");
        hr.delete(); hi.delete();
      end
      case ((n / 500) % 3)
        0: begin re = $urandom_range(0, 65535) - 32768; im = $urandom_range(0, 65535) - 32768; end
        1: begin
             ph = 2.0 * PI * (real'(n % 16) / 16.0 * 3.0 + n * 0.01);
             re = $rtoi(20000.0 * $cos(ph)); im = $rtoi(20000.0 * $sin(ph));
           end
        default: begin re = ($urandom_range(0, 1)) ? 32767 : -32768; im = ($urandom_range(0, 1)) ? 32767 : -32768; end
      endcase
      id.re = sample_t'(re); id.im = sample_t'(im);
      iv = ($urandom_range(0, 3) != 0);
      if (iv) push(re, im);
      @(negedge clk);
      check(ov == iv, "out_valid follows in_valid by one clock");
      model(mr, mi, mp);
      check(longint'(cre) == mr && longint'(cim) == mi && longint'(p) == mp,
            $sformatf("n=%0d c=(%0d,%0d) p=%0d, expected (%0d,%0d) %0d", n, cre, cim, p, mr, mi, mp));
    end
    iv = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
