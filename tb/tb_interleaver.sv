// tb_interleaver: sends random symbols at all four modulations through an
// interleaver and a deinterleaver in series and checks both outputs
// against the standard's two permutations, worked out here:
//   i = (N/16)(k mod 16) + floor(k/16)
//   j = s floor(i/s) + (i + N - floor(16 i / N)) mod s,  s = max(nbpsc/2, 1)
// Interleaver output position j must carry input bit k; the deinterleaver
// must restore the input order. Also checks the rate and 'last' flags, and
// runs with random backpressure at the end of the chain.
module tb_interleaver;
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

  logic iv, ir, ib, il, mv, mr, mb, ml, ov, ordy, ob, ol;
  rate_info_t irate, mrate, orate;
  interleaver #(.DEINT(1'b0)) u_il (.clk, .rst_n, .clear(1'b0), .in_valid(iv), .in_ready(ir), .in_bit(ib),
    .in_last(il), .in_rate(irate), .out_valid(mv), .out_ready(mr), .out_bit(mb), .out_last(ml), .out_rate(mrate));
  interleaver #(.DEINT(1'b1)) u_di (.clk, .rst_n, .clear(1'b0), .in_valid(mv), .in_ready(mr), .in_bit(mb),
    .in_last(ml), .in_rate(mrate), .out_valid(ov), .out_ready(ordy), .out_bit(ob), .out_last(ol), .out_rate(orate));

  function automatic int jpos(input int k, input int n, input int nb);
    int s, i;
    s = (nb / 2 > 1) ? nb / 2 : 1;
    i = (n / 16) * (k % 16) + k / 16;
    return s * (i / s) + (i + n - (16 * i) / n) % s;
  endfunction

  localparam int NSYM = 16;
  localparam logic [3:0] RC [4] = '{4'b1101, 4'b0101, 4'b1001, 4'b0001};
  bit         sbits [NSYM][288];
  rate_info_t srate [NSYM];
  int si = 0, sp = 0;

  always @(posedge clk) if (rst_n) begin
    int s, p;
    rate_info_t r;
    s = si; p = sp;
    if (iv && ir) begin p++; if (p == int'(srate[s].ncbps)) begin p = 0; s++; end end
    si <= s; sp <= p;
    r = srate[(s < NSYM) ? s : 0];
    iv <= (s < NSYM);
    ib <= (s < NSYM) ? sbits[s][p] : 1'b0;
    il <= (s < NSYM) && (s % 4 == 3);
    irate <= r;
  end
  always @(posedge clk) ordy <= ($urandom_range(0, 3) != 0);

  // the interleaved stream, checked as it passes between the two blocks
  int mi = 0, mp = 0;
  always @(posedge clk) if (rst_n && mv && mr && mi < NSYM) begin
    int n, k;
    n = srate[mi].ncbps;
    k = -1;
    for (int q = 0; q < n; q++) if (jpos(q, n, srate[mi].nbpsc) == mp) k = q;
    check(k >= 0 && mb == sbits[mi][k], $sformatf("interleaved symbol %0d position %0d", mi, mp));
    check(mrate.ncbps == srate[mi].ncbps, "interleaver rate");
    check(ml == ((mi % 4 == 3) && mp == n - 1), "interleaver last flag");
    mp++;
    if (mp == n) begin mp = 0; mi++; end
  end

  initial begin
    int oi, op;
    iv = 0; ib = 0; il = 0; irate = rate_info(4'b1101);
    for (int s = 0; s < NSYM; s++) begin
      srate[s] = rate_info(RC[(s / 4 + s) % 4]);
      for (int p = 0; p < 288; p++) sbits[s][p] = $urandom_range(0, 1);
    end
    #2 rst_n = 0; #20 rst_n = 1;
    oi = 0; op = 0;
    while (oi < NSYM) begin
      @(posedge clk);
      if (ov && ordy) begin
        check(ob == sbits[oi][op], $sformatf("deinterleaved symbol %0d bit %0d", oi, op));
        check(orate.nbpsc == srate[oi].nbpsc, "deinterleaver rate");
        check(ol == ((oi % 4 == 3) && op == int'(srate[oi].ncbps) - 1), "deinterleaver last flag");
        op++;
        if (op == int'(srate[oi].ncbps)) begin op = 0; oi++; end
      end
    end
    check(mi == NSYM, "all symbols seen between the blocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
