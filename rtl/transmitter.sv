// transmitter: the 802.11a transmit datapath and its controller.
//
// 'start' latches RATE, LENGTH and the scrambler seed and starts the
// preamble. The bit source then sends the 24 SIGNAL bits (rate 1/2, BPSK,
// not scrambled) and the DATA field: 16 SERVICE zeros, the LENGTH bytes
// from the input buffer (LSB first), 6 tail zeros and pad zeros up to a
// whole number of OFDM symbols. DATA bits are scrambled; the tail bits are
// forced to zero after scrambling. The chain is
//   input buffer -> scrambler -> encoder -> interleaver -> mapper ->
//   pilot insertion -> IFFT (shared, outside) -> guard insertion ->
//   preamble insertion -> DAC samples,
// every link a valid/ready token handshake, and each bit carries its block's
// rate and a 'last' flag down to the IFFT tag, so the output stage knows
// the final symbol. Samples leave at one per 'tick' (20 MHz strobe on the
// 80 MHz clock). 'done' pulses after the last sample.
// The block list follows the reference architecture; the controller and the handshakes are
// this design's.
module transmitter
  import bb_pkg::*;
#(
  parameter int IBUF_DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [3:0]  rate,
  input  logic [11:0] length,
  input  logic [6:0]  seed,
  input  logic        tick,
  // PSDU bytes from the MAC
  input  logic        byte_valid,
  output logic        byte_ready,
  input  logic [7:0]  byte_data,
  // shared IFFT
  output logic        fft_in_valid,
  input  logic        fft_in_ready,
  output cplx_t       fft_in_data,
  output logic        fft_in_tag,
  input  logic        fft_out_valid,
  output logic        fft_out_ready,
  input  cplx_t       fft_out_data,
  input  logic        fft_out_tag,
  // DAC side
  output logic        out_valid,
  output cplx_t       out_data,
  output logic        busy,
  output logic        done,
  output logic        underrun,
  // taps for the test data extractors
  output logic        tap_scr_valid,
  output logic        tap_scr_bit,
  output logic        tap_il_valid,
  output logic        tap_il_bit,
  output logic        tap_map_valid,
  output cplx_t       tap_map_data
);
  typedef enum logic [1:0] {T_IDLE, T_SIG, T_DATA, T_WAIT} tst_e;
  tst_e        tst;
  logic [3:0]  rate_q;
  logic [11:0] len_q;
  rate_info_t  ri_data, ri_sig;
  logic [16:0] idx;            // DATA bit index
  logic [7:0]  sbc;            // bit within symbol
  logic [2:0]  bitpos;
  logic        pre_busy;
  logic        sig_first;

  assign ri_sig  = rate_info(4'b1101);
  assign ri_data = rate_info(rate_q);

  // input buffer
  logic       ib_valid, ib_ready;
  logic [7:0] ib_data;
  sync_fifo #(.WIDTH(8), .DEPTH(IBUF_DEPTH)) u_ibuf (
    .clk, .rst_n, .clear(1'b0), .in_valid(byte_valid), .in_ready(byte_ready), .in_data(byte_data),
    .out_valid(ib_valid), .out_ready(ib_ready), .out_data(ib_data), .level());

  // SIGNAL field
  logic sg_valid, sg_ready, sg_bit, sg_last, sg_busy;
  signal_field_gen u_sig (
    .clk, .rst_n, .start(start && tst == T_IDLE), .rate, .length, .busy(sg_busy),
    .out_valid(sg_valid), .out_ready(sg_ready), .out_bit(sg_bit), .out_last(sg_last));

  // DATA bit source
  logic [16:0] psdu_end, tail_end;
  logic        src_valid, src_bit, in_psdu, in_tail, d_last;
  assign psdu_end = 17'd16 + {2'b00, len_q, 3'b000};
  assign tail_end = psdu_end + 17'd6;
  assign in_psdu  = (idx >= 17'd16) && (idx < psdu_end);
  assign in_tail  = (idx >= psdu_end) && (idx < tail_end);
  assign src_valid = (tst == T_DATA) && (!in_psdu || ib_valid);
  assign src_bit   = in_psdu ? ib_data[bitpos] : 1'b0;
  assign d_last    = (idx >= tail_end - 1) && (sbc == ri_data.ndbps - 1);

  // scrambler
  logic sc_valid, sc_ready, sc_bit, enc_ready;
  scrambler #(.DESCRAMBLE(1'b0)) u_scr (
    .clk, .rst_n, .init(start && tst == T_IDLE), .seed, .in_valid(src_valid), .in_ready(sc_ready),
    .in_bit(src_bit), .out_valid(sc_valid), .out_ready(enc_ready && tst == T_DATA), .out_bit(sc_bit));
  assign ib_ready = (tst == T_DATA) && in_psdu && sc_ready && bitpos == 3'd7;
  assign tap_scr_valid = sc_valid && enc_ready && tst == T_DATA;
  assign tap_scr_bit   = sc_bit;

  // encoder input mux
  logic       e_valid, e_bit, e_first, e_last;
  rate_info_t e_rate;
  always_comb begin
    if (tst == T_SIG) begin
      e_valid = sg_valid; e_bit = sg_bit; e_first = sig_first; e_last = sg_last; e_rate = ri_sig;
    end else begin
      e_valid = sc_valid && tst == T_DATA; e_bit = in_tail ? 1'b0 : sc_bit; e_first = (idx == 0);
      e_last = d_last; e_rate = ri_data;
    end
  end
  assign sg_ready = enc_ready && tst == T_SIG;

  logic       c_valid, c_ready, c_bit, c_last;
  rate_info_t c_rate;
  conv_encoder u_enc (
    .clk, .rst_n, .clear(start), .in_valid(e_valid), .in_ready(enc_ready), .in_bit(e_bit), .in_first(e_first),
    .in_last(e_last), .in_rate(e_rate), .out_valid(c_valid), .out_ready(c_ready), .out_bit(c_bit),
    .out_last(c_last), .out_rate(c_rate));

  logic       i_valid, i_ready, i_bit, i_last;
  rate_info_t i_rate;
  interleaver #(.DEINT(1'b0)) u_il (
    .clk, .rst_n, .clear(start), .in_valid(c_valid), .in_ready(c_ready), .in_bit(c_bit), .in_last(c_last),
    .in_rate(c_rate), .out_valid(i_valid), .out_ready(i_ready), .out_bit(i_bit),
    .out_last(i_last), .out_rate(i_rate));
  assign tap_il_valid = i_valid && i_ready;
  assign tap_il_bit   = i_bit;

  logic  m_valid, m_ready, m_last;
  cplx_t m_data;
  mapper u_map (
    .clk, .rst_n, .clear(start), .in_valid(i_valid), .in_ready(i_ready), .in_bit(i_bit), .in_last(i_last),
    .in_rate(i_rate), .out_valid(m_valid), .out_ready(m_ready), .out_data(m_data), .out_last(m_last));
  assign tap_map_valid = m_valid && m_ready;
  assign tap_map_data  = m_data;

  logic p_last;
  pilot_insert u_pil (
    .clk, .rst_n, .init(start && tst == T_IDLE), .in_valid(m_valid), .in_ready(m_ready),
    .in_data(m_data), .in_last(m_last), .out_valid(fft_in_valid), .out_ready(fft_in_ready),
    .out_data(fft_in_data), .out_last(p_last));
  assign fft_in_tag = p_last;

  logic  g_valid, g_ready, g_last;
  cplx_t g_data;
  guard_insert u_gi (
    .clk, .rst_n, .in_valid(fft_out_valid), .in_ready(fft_out_ready), .in_data(fft_out_data),
    .in_tag(fft_out_tag), .out_valid(g_valid), .out_ready(g_ready), .out_data(g_data),
    .out_last(g_last));

  preamble_insert u_pre (
    .clk, .rst_n, .start(start && tst == T_IDLE), .tick, .in_valid(g_valid), .in_ready(g_ready),
    .in_data(g_data), .in_last(g_last), .out_valid, .out_data, .out_preamble(), .busy(pre_busy),
    .underrun);

  // controller
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tst <= T_IDLE; rate_q <= 4'b1101; len_q <= '0; idx <= '0; sbc <= '0; bitpos <= '0;
      done <= 1'b0; sig_first <= 1'b0;
    end else begin
      done <= 1'b0;
      if (sg_valid && sg_ready) sig_first <= 1'b0;
      unique case (tst)
        T_IDLE: if (start) begin
          tst <= T_SIG; sig_first <= 1'b1; rate_q <= rate; len_q <= length; idx <= '0; sbc <= '0; bitpos <= '0;
        end
        T_SIG: if (sg_valid && sg_ready && sg_last) tst <= T_DATA;
        T_DATA: if (sc_valid && enc_ready) begin
          idx <= idx + 1'b1;
          sbc <= (sbc == ri_data.ndbps - 1) ? '0 : sbc + 1'b1;
          if (in_psdu) bitpos <= bitpos + 1'b1;
          if (d_last) tst <= T_WAIT;
        end
        default: if (!pre_busy) begin tst <= T_IDLE; done <= 1'b1; end
      endcase
    end
  end

  assign busy = (tst != T_IDLE);
endmodule
