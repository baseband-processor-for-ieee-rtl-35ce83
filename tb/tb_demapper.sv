// tb_demapper: builds random Gray-mapped points for each modulation (same
// constellations and scales as the transmitter), adds noise of up to a
// third of the decision distance, and checks that the hard decisions give
// back the original bits in order, with rate and 'last' passed along.
module tb_demapper;
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

  logic clear, iv, ir, il, ov, ordy, ob, ol;
  rate_info_t rate, orate;
  cplx_t id;
  demapper dut (.clk, .rst_n, .clear, .in_valid(iv), .in_ready(ir), .in_data(id), .in_last(il), .in_rate(rate),
    .out_valid(ov), .out_ready(ordy), .out_bit(ob), .out_last(ol), .out_rate(orate));

  function automatic int lvl(input int nb, input logic [2:0] b);   // b[0] first bit of the axis
    case (nb)
      1: return b[0] ? 1 : -1;
      2: return b[0] ? (b[1] ? 1 : 3) : (b[1] ? -1 : -3);
      default: case ({b[0], b[1], b[2]}) 0: return -7; 1: return -5; 3: return -3; 2: return -1;
                                          6: return 1; 7: return 3; 5: return 5; default: return 7; endcase
    endcase
  endfunction

  initial begin
    localparam logic [3:0] RC [4] = '{4'b1101, 4'b0101, 4'b1001, 4'b0001};
    localparam int KS [4] = '{8192, 5793, 2591, 1264};
    logic [5:0] b;
    int nb, ax, n;
    clear = 0; iv = 0; il = 0; ordy = 0; id = '0;
    #2 rst_n = 0; #20 rst_n = 1;
    @(posedge clk);
    for (int m = 0; m < 4; m++) begin
      rate = rate_info(RC[m]);
      nb = rate.nbpsc; ax = (nb == 1) ? 1 : nb / 2;
      for (int p = 0; p < 200; p++) begin
        b = 6'($urandom);
        id.re <= sample_t'(lvl(ax, b[2:0]) * KS[m] + $signed($urandom_range(0, 2 * KS[m] / 3)) - KS[m] / 3);
        id.im <= (nb == 1) ? sample_t'($signed($urandom_range(0, 8000)) - 4000)
                           : sample_t'(lvl(ax, 3'(b >> ax)) * KS[m] + $signed($urandom_range(0, 2 * KS[m] / 3)) - KS[m] / 3);
        iv <= 1; il <= (p == 199);
        @(negedge clk); while (!ir) @(negedge clk); @(posedge clk);
        iv <= 0;
        n = 0;
        while (n < nb) begin
          ordy <= ($urandom_range(0, 3) != 0);
          @(posedge clk);
          if (ov && ordy) begin
            check(ob == b[n], $sformatf("nbpsc %0d point %0d bit %0d", nb, p, n));
            check(ol == (p == 199 && n == nb - 1), "last flag");
            check(orate.nbpsc == 4'(nb), "rate passed along");
            n++;
          end
        end
        ordy <= 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
