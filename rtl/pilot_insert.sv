// pilot_insert: assembles one 64-bin IFFT input frame per OFDM symbol,
// emitted in subcarrier order k = -32..31. Data subcarriers (48) take the
// next mapper point, the pilots at k = -21, -7, 7, 21 carry
// p_n * {1, 1, 1, -1} (BPSK at FREQ_ONE), the DC and the 11 guard bins are 0.
// p_n is the pilot scrambler: the x^7+x^4+1 sequence from the all-ones
// state, one bit per symbol, 0 -> +1 and 1 -> -1; 'init' restarts it, so the
// first symbol (SIGNAL) uses p_0. A symbol whose data carried the 'last'
// flag is tagged on its final bin (the SIGNAL symbol, the first after
// 'init', is a block of its own and never tagged). Valid/ready on both sides; null and pilot
// bins need no input. Output runs from 'init' to the end of the tagged
// symbol.
module pilot_insert
  import bb_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  init,
  input  logic  in_valid,
  output logic  in_ready,
  input  cplx_t in_data,
  input  logic  in_last,
  output logic  out_valid,
  input  logic  out_ready,
  output cplx_t out_data,
  output logic  out_last      // final bin of the final symbol
);
  logic [5:0] bin;            // 0..63 <-> k = -32..31
  logic [6:0] pst;            // pilot scrambler state
  logic       last_seen;
  logic       first_sym;      // SIGNAL symbol: its block end is not the frame end
  logic       run;            // between 'init' and the end of the tagged symbol
  int         k;
  logic       is_data, is_pilot, pneg;

  always_comb begin
    k = int'(bin) - 32;
    is_pilot = (k == -21 || k == -7 || k == 7 || k == 21);
    is_data  = (k >= -26 && k <= 26 && k != 0 && !is_pilot);
    pneg     = (pst[6] ^ pst[3]) ^ (k == 21);
    out_data = '0;
    if (is_data)       out_data = in_data;
    else if (is_pilot) out_data.re = pneg ? -sample_t'(FREQ_ONE) : sample_t'(FREQ_ONE);
  end

  assign out_valid = run && (is_data ? in_valid : 1'b1);
  assign in_ready  = run && is_data && out_ready;
  assign out_last  = (bin == 6'd63) && last_seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bin <= '0; pst <= 7'h7f; last_seen <= 1'b0; first_sym <= 1'b1; run <= 1'b0;
    end else if (init) begin
      bin <= '0; pst <= 7'h7f; last_seen <= 1'b0; first_sym <= 1'b1; run <= 1'b1;
    end else if (out_valid && out_ready) begin
      bin <= bin + 1'b1;
      if (is_data && in_last && !first_sym) last_seen <= 1'b1;
      if (bin == 6'd63) begin
        pst <= scr_next(pst);
        last_seen <= 1'b0;
        first_sym <= 1'b0;
        if (last_seen || (is_data && in_last && !first_sym)) run <= 1'b0;
      end
    end
  end
endmodule
