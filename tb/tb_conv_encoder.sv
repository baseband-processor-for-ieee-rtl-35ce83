// tb_conv_encoder: encodes random blocks at rates 1/2, 2/3 and 3/4 and
// compares the coded stream with a reference model: K=7 encoder with
// g0 = 133 (A) and g1 = 171 (B) octal, punctured to A0 B0 A1 (2/3) or
// A0 B0 A1 B2 (3/4). Also checks that 'in_first' restarts from state zero,
// the block-end flag and operation under random backpressure.
module tb_conv_encoder;
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

  logic clear, iv, ir, ib, ifst, il, ov, ordy, ob, ol;
  rate_info_t rate, orate;
  conv_encoder dut (.clk, .rst_n, .clear, .in_valid(iv), .in_ready(ir), .in_bit(ib), .in_first(ifst),
    .in_last(il), .in_rate(rate), .out_valid(ov), .out_ready(ordy), .out_bit(ob), .out_last(ol), .out_rate(orate));

  bit exp_q [$];
  bit exp_last [$];
  int nout = 0;
  always @(posedge clk) if (ov && ordy) begin
    check(exp_q.size() > 0, "unexpected output");
    if (exp_q.size() > 0) begin
      check(ob == exp_q[0], $sformatf("coded bit %0d (q %0d)", nout, exp_q.size()));
      check(ol == exp_last[0], $sformatf("last flag at %0d", nout));
      void'(exp_q.pop_front()); void'(exp_last.pop_front());
    end
    nout++;
  end
  always @(posedge clk) ordy <= ($urandom_range(0, 3) != 0);

  // stimulus prepared up front; a clocked driver advances on each handshake
  bit         st_bit [$], st_first [$], st_last [$];
  rate_info_t st_rate [$];
  int         sp = 0;
  always @(posedge clk) if (rst_n) begin
    rate_info_t rr;
    if (iv && ir) sp++;
    rr = st_rate[sp];
    iv   <= sp < st_bit.size() - 1;
    ib   <= st_bit[sp];
    ifst <= st_first[sp];
    il   <= st_last[sp];
    rate <= rr;
  end

  initial begin
    localparam logic [3:0] RC [3] = '{4'b1101, 4'b1111, 4'b0011};   // 1/2, 3/4, 2/3
    logic [6:0] sr;
    rate_info_t r;
    bit a, b, d;
    int len, ph;
    clear = 0; iv = 0; ib = 0; ifst = 0; il = 0; rate = rate_info(4'b1101);
    for (int blk = 0; blk < 12; blk++) begin
      r = rate_info(RC[blk % 3]);
      len = (r.cr == CR_1_2) ? 48 : (r.cr == CR_3_4) ? 108 : 96;
      sr = '0;
      for (int i = 0; i < len; i++) begin
        d = $urandom_range(0, 1);
        sr = {sr[5:0], d};                       // sr[0] = newest
        a = sr[0] ^ sr[2] ^ sr[3] ^ sr[5] ^ sr[6];
        b = sr[0] ^ sr[1] ^ sr[2] ^ sr[3] ^ sr[6];
        ph = (r.cr == CR_3_4) ? i % 3 : (r.cr == CR_2_3) ? i % 2 : 0;
        if (!(r.cr == CR_3_4 && ph == 2)) begin exp_q.push_back(a); exp_last.push_back(0); end
        if (!(r.cr != CR_1_2 && ph == 1)) begin exp_q.push_back(b); exp_last.push_back(0); end
        exp_last[$] = (i == len - 1);
        st_bit.push_back(d); st_first.push_back(i == 0); st_last.push_back(i == len - 1); st_rate.push_back(r);
      end
    end
    st_bit.push_back(0); st_first.push_back(0); st_last.push_back(0); st_rate.push_back(r);
    #2 rst_n = 0; #20 rst_n = 1;
    wait (sp == st_bit.size() - 1);
    repeat (20) @(posedge clk);
    check(exp_q.size() == 0, $sformatf("%0d coded bits missing", exp_q.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
