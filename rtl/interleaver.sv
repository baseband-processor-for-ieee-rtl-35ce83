// interleaver: 802.11a block interleaver (DEINT=0) or deinterleaver
// (DEINT=1) for one OFDM symbol of N_CBPS coded bits (48, 96, 192 or 288).
// Coded bit k goes to position j(k) given by the standard's two
// permutations (bb_pkg::intlv_pos). Two banks of 288 bits work as a
// ping-pong pair: one is filled one bit per clock while the other is read
// one bit per clock, so a symbol needs N_CBPS clocks on either side.
// The interleaver writes bit k to address j(k) and reads in order; the
// deinterleaver writes in order and reads address j(k). The rate info of
// the first bit of a symbol sets that symbol's size and travels with it,
// as does the 'last' flag of the final symbol of a block.
module interleaver
  import bb_pkg::*;
#(
  parameter bit DEINT = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,          // synchronous flush (new frame)
  input  logic       in_valid,
  output logic       in_ready,
  input  logic       in_bit,
  input  logic       in_last,
  input  rate_info_t in_rate,
  output logic       out_valid,
  input  logic       out_ready,
  output logic       out_bit,
  output logic       out_last,    // last bit of a block's last symbol
  output rate_info_t out_rate
);
  logic [287:0] bank [2];
  logic [1:0]   full;
  rate_info_t   brate [2];
  logic [1:0]   blast;
  logic         wb, rb;
  logic [8:0]   wk, rk;
  rate_info_t   wrate;
  logic [8:0]   waddr, raddr;

  function automatic logic [8:0] perm(input logic [8:0] k, input logic [3:0] nbpsc);
    unique case (nbpsc)
      4'd1:    return 9'(intlv_pos(int'(k), 48, 1));
      4'd2:    return 9'(intlv_pos(int'(k), 96, 2));
      4'd4:    return 9'(intlv_pos(int'(k), 192, 4));
      default: return 9'(intlv_pos(int'(k), 288, 6));
    endcase
  endfunction

  assign wrate    = (wk == 0) ? in_rate : brate[wb];
  assign waddr    = DEINT ? wk : perm(wk, wrate.nbpsc);
  assign raddr    = DEINT ? perm(rk, brate[rb].nbpsc) : rk;
  assign in_ready = !full[wb];
  assign out_valid = full[rb];
  assign out_bit  = bank[rb][raddr];
  assign out_rate = brate[rb];
  assign out_last = blast[rb] && (rk == brate[rb].ncbps - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '0; wb <= 1'b0; rb <= 1'b0; wk <= '0; rk <= '0; blast <= '0;
      brate[0] <= rate_info(4'b1101); brate[1] <= rate_info(4'b1101);
      bank[0] <= '0; bank[1] <= '0;
    end else if (clear) begin
      full <= '0; wb <= 1'b0; rb <= 1'b0; wk <= '0; rk <= '0;
    end else begin
      if (in_valid && in_ready) begin
        bank[wb][waddr] <= in_bit;
        if (wk == 0) brate[wb] <= in_rate;
        if (wk == wrate.ncbps - 1) begin
          full[wb] <= 1'b1; blast[wb] <= in_last; wb <= ~wb; wk <= '0;
        end else begin
          wk <= wk + 1'b1;
        end
      end
      if (out_valid && out_ready) begin
        if (rk == brate[rb].ncbps - 1) begin
          full[rb] <= 1'b0; rb <= ~rb; rk <= '0;
        end else begin
          rk <= rk + 1'b1;
        end
      end
    end
  end
endmodule
