// preamble_insert: the transmitter's output stage. After 'start' it sends the
// 802.11a preamble, ten 16-sample short training symbols (160 samples) and
// the long training field (32-sample guard + two 64-sample long symbols,
// 160 samples), then passes the OFDM symbols from the guard inserter until
// the one tagged 'last' has gone out. One sample leaves per 'tick' (the
// 20 MHz sample strobe); if a symbol sample is not ready at a tick a zero is
// sent and 'underrun' pulses. The training samples are computed at
// elaboration from the standard's frequency-domain sequences with the same
// scaling as the IFFT output (bb_pkg::sts_sample / lts_sample).
module preamble_insert
  import bb_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  tick,
  input  logic  in_valid,
  output logic  in_ready,
  input  cplx_t in_data,
  input  logic  in_last,
  output logic  out_valid,
  output cplx_t out_data,
  output logic  out_preamble,   // the sample is part of the preamble
  output logic  busy,
  output logic  underrun
);
  typedef logic [31:0] sts_tab_t [16];
  typedef logic [31:0] lts_tab_t [64];
  function automatic sts_tab_t mk_sts();
    sts_tab_t t; for (int i = 0; i < 16; i++) t[i] = sts_sample(i); return t;
  endfunction
  function automatic lts_tab_t mk_lts();
    lts_tab_t t; for (int i = 0; i < 64; i++) t[i] = lts_sample(i); return t;
  endfunction
  localparam sts_tab_t STS = mk_sts();
  localparam lts_tab_t LTS = mk_lts();

  logic [8:0] pcnt;      // preamble sample 0..319
  logic       in_pre;
  cplx_t      pre_s;

  always_comb begin
    if (pcnt < 9'd160)      pre_s = cplx_t'(STS[pcnt[3:0]]);
    else if (pcnt < 9'd192) pre_s = cplx_t'(LTS[6'(pcnt - 9'd160 + 9'd32)]);
    else                    pre_s = cplx_t'(LTS[6'(pcnt - 9'd192)]);
  end

  assign in_ready = busy && !in_pre && tick;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; in_pre <= 1'b0; pcnt <= '0; out_valid <= 1'b0; out_data <= '0;
      out_preamble <= 1'b0; underrun <= 1'b0;
    end else begin
      out_valid <= 1'b0; underrun <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; in_pre <= 1'b1; pcnt <= '0;
      end else if (busy && tick) begin
        out_valid <= 1'b1;
        out_preamble <= in_pre;
        if (in_pre) begin
          out_data <= pre_s;
          pcnt <= pcnt + 1'b1;
          if (pcnt == 9'd319) in_pre <= 1'b0;
        end else if (in_valid) begin
          out_data <= in_data;
          if (in_last) busy <= 1'b0;
        end else begin
          out_data <= '0;
          underrun <= 1'b1;
        end
      end
    end
  end
endmodule
