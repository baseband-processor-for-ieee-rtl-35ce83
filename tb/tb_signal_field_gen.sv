// tb_signal_field_gen: for every valid RATE code and random LENGTHs, reads
// the 24 serial bits (with random out_ready stalls) and checks them against
// the SIGNAL layout: RATE R1..R4, reserved 0, LENGTH LSB first, even
// parity over bits 0-16, six zero tail bits; also checks out_last and busy.
module tb_signal_field_gen;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin #2000000; $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic start, busy, ov, ordy, ob, ol;
  logic [3:0] rate;
  logic [11:0] len;
  signal_field_gen dut (.clk, .rst_n, .start, .rate, .length(len), .busy, .out_valid(ov),
    .out_ready(ordy), .out_bit(ob), .out_last(ol));

  localparam logic [3:0] RATES [8] = '{4'b1101, 4'b1111, 4'b0101, 4'b0111, 4'b1001, 4'b1011, 4'b0001, 4'b0011};

  initial begin
    logic [23:0] got, exp;
    int n;
    start = 0; rate = 0; len = 0; ordy = 0;
    #2 rst_n = 0; #20 rst_n = 1;
    @(posedge clk);
    check(!busy && !ov, "idle after reset");
    for (int t = 0; t < 40; t++) begin
      rate <= RATES[t % 8]; len <= (t == 0) ? 12'd1 : (t == 1) ? 12'd4095 : 12'($urandom_range(1, 4095));
      start <= 1; @(posedge clk); start <= 0;
      exp = '0;
      exp[3:0] = {rate[0], rate[1], rate[2], rate[3]};
      exp[16:5] = len;
      exp[17] = ^exp[16:0];
      n = 0;
      while (n < 24) begin
        ordy <= ($urandom_range(0, 2) != 0);
        @(posedge clk);
        if (ov && ordy) begin
          got[n] = ob;
          check(ol == (n == 23), $sformatf("out_last at bit %0d", n));
          n++;
        end
      end
      ordy <= 0;
      @(posedge clk);
      check(got == exp, $sformatf("field %h, expected %h", got, exp));
      check(!busy, "busy drops after 24 bits");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
