// rx_tpg: test pattern generator of the receiver BIST. Without a preamble
// and a valid SIGNAL field a pattern would never get past the
// synchronizer, so after 'start' it sends, one sample per 'tick':
//   the 320-sample preamble, an 80-sample SIGNAL symbol announcing
//   RATE/LENGTH, then NSYM 80-sample symbols of LFSR pseudo-noise
//   (12-bit samples from a 16-bit LFSR),
// and then pulses 'done'. Preamble and SIGNAL samples are computed at
// elaboration (bb_pkg). The make-up of the pattern follows the reference architecture; its
// contents are this design's.
module rx_tpg
  import bb_pkg::*;
#(
  parameter logic [3:0]  RATE   = 4'b1101,
  parameter logic [11:0] LENGTH = 12'd6,
  parameter int          NSYM   = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  tick,
  output logic  out_valid,
  output cplx_t out_data,
  output logic  busy,
  output logic  done
);
  typedef logic [31:0] tab16_t [16];
  typedef logic [31:0] tab64_t [64];
  typedef logic [31:0] tab80_t [80];
  function automatic tab16_t mk_sts(); tab16_t t; for (int i = 0; i < 16; i++) t[i] = sts_sample(i); return t; endfunction
  function automatic tab64_t mk_lts(); tab64_t t; for (int i = 0; i < 64; i++) t[i] = lts_sample(i); return t; endfunction
  function automatic tab80_t mk_sig(); tab80_t t; for (int i = 0; i < 80; i++) t[i] = signal_sample(RATE, LENGTH, i); return t; endfunction
  localparam tab16_t STS = mk_sts();
  localparam tab64_t LTS = mk_lts();
  localparam tab80_t SIG = mk_sig();
  localparam int TOTAL = 400 + 80 * NSYM;

  logic [15:0] cnt;
  logic [15:0] lq;
  tpg_lfsr u_lfsr (.clk, .rst_n, .load(start), .step(busy && tick && cnt >= 16'd400), .q(lq));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; cnt <= '0; out_valid <= 1'b0; out_data <= '0; done <= 1'b0;
    end else begin
      out_valid <= 1'b0; done <= 1'b0;
      if (start) begin
        busy <= 1'b1; cnt <= '0;
      end else if (busy && tick) begin
        out_valid <= 1'b1;
        if (cnt < 16'd160)      out_data <= cplx_t'(STS[cnt[3:0]]);
        else if (cnt < 16'd192) out_data <= cplx_t'(LTS[6'(cnt - 16'd128)]);
        else if (cnt < 16'd320) out_data <= cplx_t'(LTS[6'(cnt - 16'd192)]);
        else if (cnt < 16'd400) out_data <= cplx_t'(SIG[7'(cnt - 16'd320)]);
        else begin
          out_data.re <= sample_t'($signed(lq[15:4]));
          out_data.im <= sample_t'($signed({lq[3:0], lq[15:8]}));
        end
        cnt <= cnt + 1'b1;
        if (cnt == 16'(TOTAL - 1)) begin busy <= 1'b0; done <= 1'b1; end
      end
    end
  end
endmodule
