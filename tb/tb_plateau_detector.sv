// tb_plateau_detector: self-checking test of the frame detector with its
// default parameters (THR_NUM = 6, PLAT_LEN = 32, PMIN = 4096). Random
// correlation/power pairs are fed one per valid cycle, some with gaps. Runs are
// biased so that plateaus of random length (often near 32) occur. A reference
// model computes the same |c| approximation and threshold test, counts
// consecutive plateau samples, and predicts the detect pulse one clock after
// the 32nd sample and the held correlation. The combinational on_plateau
// output is checked for every input, and detect must be low otherwise.
module tb_plateau_detector;
  localparam int CW = 30;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask
  initial begin #50_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic clear, iv, det, onp;
  logic signed [CW-1:0] cre, cim, qre, qim;
  logic [CW-1:0] p;
  plateau_detector dut (.clk, .rst_n, .clear, .in_valid(iv), .c_re(cre), .c_im(cim), .p,
                        .detect(det), .c_re_q(qre), .c_im_q(qim), .on_plateau(onp));

  function automatic bit model_on(longint r, longint i, longint pw);
    longint ar, ai, mx, mn;
    ar = r < 0 ? -r : r; ai = i < 0 ? -i : i;
    mx = ar > ai ? ar : ai; mn = ar > ai ? ai : ar;
    return (mx * 8 + mn * 4 >= pw * 6) && (pw >= 4096);
  endfunction

  initial begin
    int cnt, runlen, seen;
    bit want, exp_det;
    longint er, ei;
    clear = 0; iv = 0; cre = '0; cim = '0; p = '0;
    cnt = 0; exp_det = 0; seen = 0;
    #22 rst_n = 1;
    @(negedge clk);
    for (int blk = 0; blk < 400; blk++) begin
      want = $urandom_range(0, 1);
      runlen = (blk % 3 == 0) ? $urandom_range(30, 48) : $urandom_range(1, 20);
      for (int s = 0; s < runlen; s++) begin
        p = CW'(want ? $urandom_range(4096, 200000) : $urandom_range(0, 200000));
        if (want) begin
          cre = CW'($signed(int'(p) * 8 / 10 * ($urandom_range(0, 1) ? 1 : -1)));
          cim = CW'($signed(int'($urandom_range(0, int'(p) / 4))));
        end else begin
          cre = CW'($signed(int'($urandom_range(0, int'(p)))) - int'(p) / 2);
          cim = CW'($signed(int'($urandom_range(0, int'(p)))) - int'(p) / 2);
        end
        iv = ($urandom_range(0, 7) != 0);
        #1;
        check(onp == model_on(cre, cim, p), $sformatf("on_plateau for c=(%0d,%0d) p=%0d", cre, cim, p));
        exp_det = 0;
        if (iv) begin
          if (!model_on(cre, cim, p)) cnt = 0;
          else if (cnt == 31) begin exp_det = 1; er = cre; ei = cim; cnt = 0; end
          else cnt++;
        end
        @(negedge clk);
        check(det == exp_det, $sformatf("detect %0b, expected %0b", det, exp_det));
        if (exp_det) begin
          seen++;
          check(qre == er && qim == ei, "held correlation is the 32nd plateau sample's");
        end
      end
    end
    // clear restarts the count
    clear = 1; @(negedge clk); clear = 0;
    check(!det, "no detect after clear");
    check(seen > 5, $sformatf("only %0d detections exercised", seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
