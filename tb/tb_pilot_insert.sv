// tb_pilot_insert: self-checking test of the 64-bin symbol assembler. Each
// frame starts with 'init', then a SIGNAL symbol and 1..20 further symbols
// of random data points, with random input gaps and random output stalls;
// the last data point of the frame carries in_last. Every output bin is
// checked against a model: data bins (48) carry the input points in order,
// the pilots at k = -21, -7, 7, 21 carry p_n * {1, 1, 1, -1} * 8192 where p_n
// is taken from the standard's pilot polarity sequence (first 16 values
// written out here, later ones from an independent LFSR model that must
// agree with them), the other 12 bins are 0, and out_last marks only the
// final bin of the frame. After the frame no further output may appear.
module tb_pilot_insert;
  import bb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask
  initial begin #50_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic init, iv, ir, il, ov, ordy, ol;
  cplx_t id, od;
  pilot_insert dut (.clk, .rst_n, .init, .in_valid(iv), .in_ready(ir), .in_data(id), .in_last(il),
                    .out_valid(ov), .out_ready(ordy), .out_data(od), .out_last(ol));

  // standard pilot polarity p_0..p_15
  localparam logic [15:0] P16 = 16'b0100_1111_0111_0000;   // bit n set -> p_n = -1 (LSB = p_0)
  int pol [128];

  cplx_t q [$];          // points sent, in order
  int    nsent, ntotal;

  // clocked input driver
  always @(posedge clk) begin
    if (iv && ir) nsent++;
    if (init) iv <= 1'b0;
    else if (!iv || ir) begin
      if (nsent < ntotal && $urandom_range(0, 3) != 0) begin
        iv <= 1'b1; id <= q[nsent]; il <= (nsent == ntotal - 1);
      end else iv <= 1'b0;
    end
    ordy <= ($urandom_range(0, 4) != 0);
  end

  initial begin
    logic [6:0] s;
    int nsym, bin, sym, k, di;
    cplx_t e;
    s = 7'h7f;
    for (int n = 0; n < 128; n++) begin
      pol[n] = (s[6] ^ s[3]) ? -1 : 1;
      s = {s[5:0], s[6] ^ s[3]};
    end
    for (int n = 0; n < 16; n++) check(pol[n] == (P16[n] ? -1 : 1), $sformatf("TB pilot model p_%0d", n));
    init = 0; iv = 0; id = '0; il = 0; ordy = 0; nsent = 0; ntotal = 0;
    #22 rst_n = 1;
    for (int f = 0; f < 30; f++) begin
      nsym = $urandom_range(2, 21);
      q.delete();
      for (int i = 0; i < 48 * nsym; i++) begin
        e.re = sample_t'($urandom()); e.im = sample_t'($urandom()); q.push_back(e);
      end
      @(negedge clk); init = 1; nsent = 0; ntotal = 48 * nsym; @(negedge clk); init = 0;
      bin = 0; sym = 0; di = 0;
      while (sym < nsym) begin
        #1;                           // sample the transfer the next edge will take
        if (!(ov && ordy)) begin @(negedge clk); continue; end
        k = bin - 32;
        if (k == -21 || k == -7 || k == 7 || k == 21) begin
          e.re = sample_t'(pol[sym] * ((k == 21) ? -1 : 1) * FREQ_ONE); e.im = '0;
        end else if (k >= -26 && k <= 26 && k != 0) begin
          e = q[di]; di++;
        end else e = '0;
        check(od == e, $sformatf("frame %0d symbol %0d k=%0d: got (%0d,%0d) expected (%0d,%0d)",
                                 f, sym, k, od.re, od.im, e.re, e.im));
        check(ol == (sym == nsym - 1 && bin == 63), $sformatf("frame %0d symbol %0d k=%0d: out_last %0b", f, sym, k, ol));
        bin++;
        if (bin == 64) begin bin = 0; sym++; end
        @(negedge clk);
      end
      repeat (20) begin @(negedge clk); check(!ov, "no output after the frame"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
