// tb_scrambler: checks the transmit scrambler against the 127-bit sequence
// the 802.11a standard lists for the all-ones initial state, then runs the
// receive-side descrambler on scrambled data (first 7 bits zero, as the
// SERVICE field) and checks that it recovers the data from bit 8 on.
// Random stalls on out_ready exercise the handshake.
module tb_scrambler;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin #2000000; $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // standard sequence, all-ones state, first bit on the left
  localparam string SEQ = {"00001110111100101100100100000010", "00100110001011101011011000001100",
                           "11010100111001111011010000101010", "111110100101000110111000111111 1"};

  logic t_init, t_iv, t_ir, t_ib, t_ov, t_or, t_ob;
  logic r_init, r_iv, r_ir, r_ib, r_ov, r_ob;
  scrambler #(.DESCRAMBLE(1'b0)) u_tx (.clk, .rst_n, .init(t_init), .seed(7'h7f), .in_valid(t_iv),
    .in_ready(t_ir), .in_bit(t_ib), .out_valid(t_ov), .out_ready(t_or), .out_bit(t_ob));
  scrambler #(.DESCRAMBLE(1'b1)) u_rx (.clk, .rst_n, .init(r_init), .seed(7'h00), .in_valid(r_iv),
    .in_ready(r_ir), .in_bit(r_ib), .out_valid(r_ov), .out_ready(1'b1), .out_bit(r_ob));

  initial begin
    string seq;
    int n;
    logic [299:0] data, scr;
    t_init = 0; t_iv = 0; t_ib = 0; t_or = 0; r_init = 0; r_iv = 0; r_ib = 0;
    #2 rst_n = 0; #20 rst_n = 1;
    seq = "";
    for (int i = 0; i < SEQ.len(); i++) if (SEQ[i] != " ") seq = {seq, SEQ.substr(i, i)};
    @(posedge clk); t_init <= 1; @(posedge clk); t_init <= 0;
    // zeros in: the sequence itself comes out
    n = 0;
    while (n < 127) begin
      t_iv <= 1; t_ib <= 0; t_or <= ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (t_iv && t_or) begin
        check(t_ob == (seq[n] == "1"), $sformatf("sequence bit %0d", n));
        n++;
      end
    end
    t_iv <= 0;
    // scramble random data whose first 7 bits are zero, then descramble
    data = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    data[6:0] = '0;
    @(posedge clk); t_init <= 1; @(posedge clk); t_init <= 0;
    for (int i = 0; i < 300; i++) begin
      t_iv <= 1; t_or <= 1; t_ib <= data[i];
      @(posedge clk); scr[i] = t_ob;
    end
    t_iv <= 0;
    @(posedge clk); r_init <= 1; @(posedge clk); r_init <= 0;
    for (int i = 0; i < 300; i++) begin
      r_iv <= 1; r_ib <= scr[i];
      #1 check(r_ov && r_ir, "descrambler handshake");
      check(r_ob == (i < 7 ? 1'b0 : data[i]), $sformatf("descrambled bit %0d", i));
      @(posedge clk);
    end
    r_iv <= 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
