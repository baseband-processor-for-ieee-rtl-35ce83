// tb_tde_misr: drives random words into the signature register and compares
// with a reference model (fold the 32-bit word to 16 bits, shift with the
// CRC-16-CCITT feedback, XOR in the folded word). Also checks 'clear', that
// 'en' low holds the signature, and that a single flipped input bit changes
// the final signature.
module tb_tde_misr;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin #2000000; $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic clear, en;
  logic [31:0] data;
  logic [15:0] sig;
  tde_misr dut (.clk, .rst_n, .clear, .en, .data, .sig);

  function automatic logic [15:0] model(input logic [15:0] s, input logic [31:0] d);
    return ({s[14:0], 1'b0} ^ (s[15] ? 16'h1021 : 16'h0)) ^ d[15:0] ^ d[31:16];
  endfunction

  initial begin
    logic [15:0] m, first;
    logic [31:0] words [200];
    clear = 0; en = 0; data = 0;
    #2 rst_n = 0; #20 rst_n = 1;
    for (int i = 0; i < 200; i++) words[i] = $urandom;
    for (int pass = 0; pass < 2; pass++) begin
      @(posedge clk); clear <= 1; @(posedge clk); clear <= 0; #1;
      check(sig == 0, "clear");
      m = 0;
      for (int i = 0; i < 200; i++) begin
        en <= ($urandom_range(0, 3) != 0);
        data <= (pass == 1 && i == 77) ? words[i] ^ 32'h0001_0000 : words[i];
        @(posedge clk); #1;
        if (en) m = model(m, data);
        check(sig == m, $sformatf("pass %0d word %0d: %h, expected %h", pass, i, sig, m));
        if (!en) i--;
      end
      en <= 0;
      repeat (3) @(posedge clk); #1;
      check(sig == m, "holds with en low");
      if (pass == 0) first = sig;
      else check(sig != first, "one flipped bit changes the signature");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
