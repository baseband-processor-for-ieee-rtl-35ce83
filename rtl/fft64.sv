// fft64: the 64-point transform shared by transmitter (IFFT) and receiver
// (FFT). Radix-2 decimation in time, in place, one butterfly per clock:
// 6 stages x 32 butterflies = 192 clocks per transform.
// A 64-word input buffer is filled (one sample per clock, valid/ready, written
// in bit-reversed order) while the previous transform is computed and read
// out, so a new symbol can start every 257 clocks (64 read + 192 compute +
// 1 buffer copy),
// inside the 320 clocks of an OFDM symbol at 80 MHz.
// Direction is chosen per symbol by 'in_inv' (1 = IFFT) with the first sample.
//   IFFT: input bins in order k = -32..31, output time samples n = 0..63,
//         each stage divides by 2 (total 1/64), twiddles exp(+j2pi k/64).
//   FFT:  input time samples n = 0..63, output bins k = -32..31, no scaling.
// Internal words are IW bits; outputs saturate to 16 bits. One 'tag' bit,
// sampled with a symbol's final input sample, travels with it. The shared use, the transform itself and the
// size follow the reference architecture; radix, scaling and buffering are this design's.
module fft64
  import bb_pkg::*;
#(
  parameter int IW = 20
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  cplx_t in_data,
  input  logic  in_inv,
  input  logic  in_tag,
  output logic  out_valid,
  input  logic  out_ready,
  output cplx_t out_data,
  output logic  out_first,
  output logic  out_tag,
  output logic  out_inv,
  output logic  busy
);
  typedef logic signed [IW-1:0] word_t;
  typedef logic [31:0] tw_tab_t [32];

  function automatic tw_tab_t mk_tw();
    tw_tab_t t;
    for (int i = 0; i < 32; i++) t[i] = twiddle(i);
    return t;
  endfunction
  localparam tw_tab_t TW = mk_tw();

  function automatic logic [5:0] bitrev(input logic [5:0] a);
    return {a[0], a[1], a[2], a[3], a[4], a[5]};
  endfunction

  function automatic sample_t sat(input word_t v);
    if (v > word_t'(32767))  return 16'sd32767;
    if (v < word_t'(-32768)) return -16'sd32768;
    return sample_t'(v);
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_CALC, S_OUT} st_e;
  st_e st;

  cplx_t      ibuf [64];
  cplx_t      tw;
  logic [6:0] icnt;            // samples in the input buffer
  logic       iinv, itag;
  word_t      mre [64];
  word_t      mim [64];
  logic       inv, tag;
  logic [2:0] stage;
  logic [4:0] bfly;
  logic [5:0] ocnt;

  // butterfly addresses
  logic [5:0] i0, i1;
  logic [4:0] tk;
  always_comb begin
    logic [5:0] half, pos, grp;
    half = 6'd1 << stage;
    pos  = 6'(bfly) & (half - 1'b1);
    grp  = 6'(bfly) >> stage;
    i0   = 6'((grp << (stage + 1)) | pos);
    i1   = i0 + half;
    tk   = 5'(pos << (3'd5 - stage));
  end

  // butterfly arithmetic
  word_t a_re, a_im, b_re, b_im, t_re, t_im, y0_re, y0_im, y1_re, y1_im;
  always_comb begin
    logic signed [IW+16:0] pr, pi;
    logic signed [15:0] wr, wi;
    logic signed [IW:0] s0r, s0i, s1r, s1i;
    a_re = mre[i0]; a_im = mim[i0]; b_re = mre[i1]; b_im = mim[i1];
    tw = cplx_t'(TW[tk]);
    wr = tw.re;
    wi = inv ? -tw.im : tw.im;
    pr = b_re * wr - b_im * wi + (1 <<< 13);
    pi = b_re * wi + b_im * wr + (1 <<< 13);
    t_re = word_t'(pr >>> 14);
    t_im = word_t'(pi >>> 14);
    s0r = a_re + t_re; s0i = a_im + t_im;
    s1r = a_re - t_re; s1i = a_im - t_im;
    if (inv) begin
      y0_re = word_t'((s0r + 1) >>> 1); y0_im = word_t'((s0i + 1) >>> 1);
      y1_re = word_t'((s1r + 1) >>> 1); y1_im = word_t'((s1i + 1) >>> 1);
    end else begin
      y0_re = word_t'(s0r); y0_im = word_t'(s0i);
      y1_re = word_t'(s1r); y1_im = word_t'(s1i);
    end
  end

  logic [5:0] iaddr, oaddr;
  assign iaddr = bitrev((icnt == 0 ? in_inv : iinv) ? 6'(icnt[5:0] + 6'd32) : icnt[5:0]);
  assign oaddr = inv ? ocnt : ocnt + 6'd32;
  assign in_ready = (icnt != 7'd64);
  assign out_valid = (st == S_OUT);
  assign out_data.re = sat(mre[oaddr]);
  assign out_data.im = sat(mim[oaddr]);
  assign out_first = (ocnt == 0);
  assign out_tag = tag;
  assign out_inv = inv;
  assign busy = (st != S_IDLE) || (icnt != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; icnt <= '0; iinv <= 1'b0; itag <= 1'b0; inv <= 1'b0; tag <= 1'b0;
      stage <= '0; bfly <= '0; ocnt <= '0;
      for (int i = 0; i < 64; i++) begin ibuf[i] <= '0; mre[i] <= '0; mim[i] <= '0; end
    end else begin
      if (in_valid && in_ready) begin
        ibuf[iaddr] <= in_data;
        if (icnt == 0) iinv <= in_inv;
        if (icnt == 7'd63) itag <= in_tag;
        icnt <= icnt + 1'b1;
      end
      unique case (st)
        S_IDLE: if (icnt == 7'd64) begin
          for (int i = 0; i < 64; i++) begin
            mre[i] <= word_t'(ibuf[i].re); mim[i] <= word_t'(ibuf[i].im);
          end
          inv <= iinv; tag <= itag; icnt <= '0;
          stage <= '0; bfly <= '0; st <= S_CALC;
        end
        S_CALC: begin
          mre[i0] <= y0_re; mim[i0] <= y0_im;
          mre[i1] <= y1_re; mim[i1] <= y1_im;
          bfly <= bfly + 1'b1;
          if (bfly == 5'd31) begin
            if (stage == 3'd5) begin st <= S_OUT; ocnt <= '0; end
            else stage <= stage + 1'b1;
          end
        end
        default: if (out_ready) begin
          ocnt <= ocnt + 1'b1;
          if (ocnt == 6'd63) st <= S_IDLE;
        end
      endcase
    end
  end
endmodule
