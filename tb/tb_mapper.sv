// tb_mapper: sends random bits for BPSK, QPSK, 16-QAM and 64-QAM and checks
// every point against the 802.11a Gray constellation scaled by
// K_MOD * 8192 (1, 1/sqrt(2), 1/sqrt(10), 1/sqrt(42)), with random
// backpressure, and the propagation of the 'last' flag.
module tb_mapper;
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

  logic clear, iv, ir, ib, il, ov, ordy, ol;
  rate_info_t rate;
  cplx_t od;
  mapper dut (.clk, .rst_n, .clear, .in_valid(iv), .in_ready(ir), .in_bit(ib), .in_last(il), .in_rate(rate),
    .out_valid(ov), .out_ready(ordy), .out_data(od), .out_last(ol));

  function automatic int level(input int nb, input logic [2:0] b);   // b[0] first bit
    case (nb)
      1: return b[0] ? 1 : -1;
      default: begin
        // 64-QAM: 000 -7, 001 -5, 011 -3, 010 -1, 110 1, 111 3, 101 5, 100 7 (b0 b1 b2)
        int g;
        g = {b[0], b[1], b[2]};
        case (g) 0: return -7; 1: return -5; 3: return -3; 2: return -1;
                 6: return 1; 7: return 3; 5: return 5; default: return 7; endcase
      end
    endcase
  endfunction

  initial begin
    localparam logic [3:0] RC [4] = '{4'b1101, 4'b0101, 4'b1001, 4'b0001};
    localparam int KS [4] = '{8192, 5793, 2591, 1264};
    logic [5:0] b;
    int nb, half, ei, eq, pts;
    clear = 0; iv = 0; ib = 0; il = 0; ordy = 1;
    #2 rst_n = 0; #20 rst_n = 1;
    @(posedge clk);
    for (int m = 0; m < 4; m++) begin
      rate = rate_info(RC[m]);
      nb = rate.nbpsc;
      for (int p = 0; p < 200; p++) begin
        b = 6'($urandom);
        for (int i = 0; i < nb; i++) begin
          iv <= 1; ib <= b[i]; il <= (p == 199) && (i == nb - 1);
          @(negedge clk); while (!ir) @(negedge clk); @(posedge clk);
        end
        iv <= 0;
        pts = 0;
        while (pts == 0) begin
          ordy <= $urandom_range(0, 1);
          @(posedge clk);
          if (ov && ordy) pts = 1;
        end
        ordy <= 0;
        half = (nb == 1) ? 1 : nb / 2;
        if (nb == 1) begin ei = b[0] ? 1 : -1; eq = 0; end
        else if (nb == 2) begin ei = b[0] ? 1 : -1; eq = b[1] ? 1 : -1; end
        else if (nb == 4) begin
          ei = b[0] ? (b[1] ? 1 : 3) : (b[1] ? -1 : -3);
          eq = b[2] ? (b[3] ? 1 : 3) : (b[3] ? -1 : -3);
        end else begin
          ei = level(6, b[2:0]); eq = level(6, b[5:3]);
        end
        check(od.re == ei * KS[m] && od.im == eq * KS[m],
              $sformatf("nbpsc %0d bits %b: (%0d,%0d) expected (%0d,%0d)", nb, b, od.re, od.im, ei * KS[m], eq * KS[m]));
        check(ol == (p == 199), "last flag");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
