// tb_viterbi_decoder: encodes random blocks (data + six zero tail bits)
// with a reference K=7 encoder, punctures them to rate 1/2, 2/3 or 3/4,
// flips a few well-separated coded bits, and checks that the decoder
// returns every data bit in order, with out_last on the block's final bit.
// Blocks of different rates follow each other without gaps, as SIGNAL and
// DATA do in a frame. Also checks that a block short enough to be held
// completely in the survivor registers is decoded by the end-of-block flush.
module tb_viterbi_decoder;
  import bb_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin #5000000; $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic init, iv, ir, ib, il, ov, ob, ol;
  rate_info_t rate;
  viterbi_decoder dut (.clk, .rst_n, .init, .in_valid(iv), .in_ready(ir), .in_bit(ib), .in_last(il),
    .in_rate(rate), .out_valid(ov), .out_bit(ob), .out_last(ol));

  bit         c_bit [$], c_last [$];
  rate_info_t c_rate [$];
  bit         d_bit [$], d_last [$];
  int cp = 0;
  always @(posedge clk) if (rst_n && !init) begin
    rate_info_t r;
    if (iv && ir) cp++;
    r = c_rate[cp < c_rate.size() ? cp : 0];
    iv   <= cp < c_bit.size() - 1;
    ib   <= c_bit[cp];
    il   <= c_last[cp];
    rate <= r;
  end

  int nout = 0;
  always @(posedge clk) if (ov) begin
    check(nout < d_bit.size(), "unexpected output bit");
    if (nout < d_bit.size()) begin
      check(ob == d_bit[nout], $sformatf("decoded bit %0d", nout));
      check(ol == d_last[nout], $sformatf("last flag at bit %0d", nout));
    end
    nout++;
  end

  initial begin
    localparam logic [3:0] RC [4] = '{4'b1101, 4'b1111, 4'b0011, 4'b1101};   // 1/2, 3/4, 2/3, 1/2
    localparam int LEN [8] = '{18, 210, 140, 300, 66, 30, 500, 18};
    logic [6:0] sr;
    rate_info_t r;
    bit a, b, d;
    int ph, ncoded, since_flip, nflip;
    init = 0; iv = 0; ib = 0; il = 0; rate = rate_info(4'b1101);
    for (int blk = 0; blk < 8; blk++) begin
      r = rate_info(RC[blk % 4]);
      sr = '0;
      ncoded = 0;
      since_flip = 0;
      for (int i = 0; i < LEN[blk] + 6; i++) begin
        d = (i < LEN[blk]) ? $urandom_range(0, 1) : 1'b0;
        d_bit.push_back(d); d_last.push_back(i == LEN[blk] + 5);
        sr = {sr[5:0], d};
        a = sr[0] ^ sr[2] ^ sr[3] ^ sr[5] ^ sr[6];
        b = sr[0] ^ sr[1] ^ sr[2] ^ sr[3] ^ sr[6];
        ph = (r.cr == CR_3_4) ? i % 3 : (r.cr == CR_2_3) ? i % 2 : 0;
        // one error every 60 coded bits at rate 1/2, none in punctured blocks
        if (r.cr == CR_1_2 && ++since_flip == 60) begin a = !a; since_flip = 0; nflip++; end
        if (!(r.cr == CR_3_4 && ph == 2)) begin c_bit.push_back(a); c_last.push_back(0); c_rate.push_back(r); end
        if (!(r.cr != CR_1_2 && ph == 1)) begin c_bit.push_back(b); c_last.push_back(0); c_rate.push_back(r); end
      end
      c_last[$] = 1;
    end
    c_bit.push_back(0); c_last.push_back(0); c_rate.push_back(r);
    #2 rst_n = 0; #20 rst_n = 1;
    @(posedge clk); init <= 1; @(posedge clk); init <= 0;
    wait (nout == d_bit.size());
    repeat (100) @(posedge clk);
    check(nout == d_bit.size(), $sformatf("%0d bits out, expected %0d", nout, d_bit.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
