// baseband_top: IEEE 802.11a baseband processor with embedded BIST.
//
// One 80 MHz clock 'clk' feeds four gated clock domains, switched by
// power_ctrl: transmitter, shared FFT/IFFT, receive tracking (frame search)
// and receive processing. The receiver searches for frames whenever the
// chip is not transmitting; a 'tx_req' from the MAC (sampled while
// searching) switches to transmit. The single 64-point FFT serves the
// transmitter as IFFT and the receiver as FFT; 'tx_mode' selects who
// drives it, and each symbol carries its direction through it.
// Transmit samples leave at 20 MHz (one per four clocks, 'tick' from an
// internal divider); receive samples enter with 'rx_in_valid'.
//
// BIST: 'bist_start' with 'bist_sel' = 0 tests the transmitter (LFSR bytes
// into the input buffer and a built-in start sequence), 'bist_sel' = 1 the
// receiver (preamble, SIGNAL and LFSR noise from rx_tpg). During a test all
// clock domains run. Four signature registers per direction watch the
// datapath; 'bist_ok' pulses for each internal register that matches and
// then holds the output register's result.
module baseband_top
  import bb_pkg::*;
#(
  parameter logic [3:0]  BIST_TX_RATE = 4'b1011,     // 36 Mbit/s
  parameter logic [11:0] BIST_TX_LEN  = 12'd20,
  parameter logic [3:0]  BIST_RX_RATE = 4'b1101,
  parameter logic [11:0] BIST_RX_LEN  = 12'd6,
  parameter int          BIST_RX_NSYM = 3,
  parameter logic [15:0] TX_SIG0 = 16'h6cac, TX_SIG1 = 16'he1fa,
  parameter logic [15:0] TX_SIG2 = 16'h01a1, TX_SIG3 = 16'h688c,
  parameter logic [15:0] RX_SIG0 = 16'h74ed, RX_SIG1 = 16'h86e0,
  parameter logic [15:0] RX_SIG2 = 16'he4d5, RX_SIG3 = 16'ha99c
) (
  input  logic        clk,
  input  logic        rst_n,
  // MAC, transmit
  input  logic        tx_req,
  input  logic [3:0]  tx_rate,
  input  logic [11:0] tx_length,
  input  logic [6:0]  tx_seed,
  input  logic        tx_byte_valid,
  output logic        tx_byte_ready,
  input  logic [7:0]  tx_byte,
  output logic        tx_done,
  // DAC
  output logic        tx_out_valid,
  output cplx_t       tx_out_data,
  // ADC
  input  logic        rx_in_valid,
  input  cplx_t       rx_in_data,
  // MAC, receive
  output logic        rx_byte_valid,
  output logic [7:0]  rx_byte,
  output logic [3:0]  rx_rate,
  output logic [11:0] rx_length,
  output logic        rx_done,
  output logic        rx_fail,
  // BIST
  input  logic        bist_start,
  input  logic        bist_sel,
  output logic        bist_ok,
  output logic        bist_busy,
  // status
  output logic [3:0]  clk_en,          // {proc, trk, fft, tx}
  output logic        tx_mode,
  output logic        tx_underrun,
  output logic        rx_timing_found,
  output logic        rx_h_update
);
  // ---------------- 20 MHz sample strobe ----------------
  logic [1:0] div;
  logic       tick;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) div <= '0; else div <= div + 1'b1;
  assign tick = (div == 2'd3);

  // ---------------- BIST sequencing ----------------
  // a test lasts from bist_start until its controller has reported
  logic bist_act, bist_tx, bist_rx, bist_go, bist_busy_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bist_act <= 1'b0; bist_tx <= 1'b0; bist_rx <= 1'b0; bist_busy_d <= 1'b0;
    end else begin
      bist_busy_d <= bist_busy;
      if (bist_start) begin bist_act <= 1'b1; bist_tx <= !bist_sel; bist_rx <= bist_sel; end
      else if (bist_busy_d && !bist_busy) begin bist_act <= 1'b0; bist_tx <= 1'b0; bist_rx <= 1'b0; end
    end
  end
  assign bist_go = bist_start;

  // ---------------- power control and clock gating ----------------
  logic en_tx, en_fft, en_trk, en_proc, tx_start, proc_start, trk_restart;
  logic detected, rx_end, txp_done, bist_tx_req;
  logic gclk_tx, gclk_fft, gclk_trk, gclk_proc;

  power_ctrl u_pwr (
    .clk, .rst_n, .tx_req(tx_req || bist_tx_req), .tx_end(txp_done), .detected, .rx_end,
    .en_tx, .en_fft, .en_trk, .en_proc, .tx_start, .proc_start, .trk_restart, .tx_mode);

  clock_gate u_cg_tx   (.clk, .en(en_tx),   .test_en(bist_act), .gclk(gclk_tx));
  clock_gate u_cg_fft  (.clk, .en(en_fft),  .test_en(bist_act), .gclk(gclk_fft));
  clock_gate u_cg_trk  (.clk, .en(en_trk),  .test_en(bist_act), .gclk(gclk_trk));
  clock_gate u_cg_proc (.clk, .en(en_proc), .test_en(bist_act), .gclk(gclk_proc));
  assign clk_en = {en_proc, en_trk, en_fft, en_tx};

  // transmit BIST request, held until the transmitter starts
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) bist_tx_req <= 1'b0;
    else if (bist_go && !bist_sel) bist_tx_req <= 1'b1;
    else if (tx_start) bist_tx_req <= 1'b0;

  // ---------------- shared FFT ----------------
  logic  f_in_valid, f_in_ready, f_out_valid, f_out_ready, f_out_first, f_out_tag, f_out_inv, f_tag;
  cplx_t f_in_data, f_out_data;
  logic  t_fin_valid, t_fin_tag, t_fout_ready, r_fin_valid, r_fout_ready;
  cplx_t t_fin_data, r_fin_data;

  assign f_in_valid  = tx_mode ? t_fin_valid : r_fin_valid;
  assign f_in_data   = tx_mode ? t_fin_data  : r_fin_data;
  assign f_tag       = tx_mode ? t_fin_tag   : 1'b0;
  assign f_out_ready = f_out_inv ? t_fout_ready : r_fout_ready;

  fft64 u_fft (
    .clk(gclk_fft), .rst_n, .in_valid(f_in_valid), .in_ready(f_in_ready), .in_data(f_in_data),
    .in_inv(tx_mode), .in_tag(f_tag), .out_valid(f_out_valid), .out_ready(f_out_ready),
    .out_data(f_out_data), .out_first(f_out_first), .out_tag(f_out_tag), .out_inv(f_out_inv),
    .busy());

  // ---------------- transmitter ----------------
  logic [3:0]  t_rate;
  logic [11:0] t_len;
  logic        t_byte_valid, t_byte_ready;
  logic [7:0]  t_byte;
  logic [15:0] tpg_q;
  logic        tap_scr_v, tap_scr_b, tap_il_v, tap_il_b, tap_map_v;
  cplx_t       tap_map_d;

  tpg_lfsr u_tx_tpg (.clk, .rst_n, .load(bist_go), .step(bist_tx && t_byte_valid && t_byte_ready),
                     .q(tpg_q));

  assign t_rate       = bist_tx ? BIST_TX_RATE : tx_rate;
  assign t_len        = bist_tx ? BIST_TX_LEN  : tx_length;
  assign t_byte_valid = bist_tx ? 1'b1 : tx_byte_valid;
  assign t_byte       = bist_tx ? tpg_q[7:0] : tx_byte;
  assign tx_byte_ready = !bist_tx && t_byte_ready;

  transmitter u_tx (
    .clk(gclk_tx), .rst_n, .start(tx_start), .rate(t_rate), .length(t_len),
    .seed(bist_tx ? 7'h5d : tx_seed), .tick, .byte_valid(t_byte_valid), .byte_ready(t_byte_ready),
    .byte_data(t_byte), .fft_in_valid(t_fin_valid), .fft_in_ready(f_in_ready && tx_mode),
    .fft_in_data(t_fin_data), .fft_in_tag(t_fin_tag), .fft_out_valid(f_out_valid && f_out_inv),
    .fft_out_ready(t_fout_ready), .fft_out_data(f_out_data), .fft_out_tag(f_out_tag),
    .out_valid(tx_out_valid), .out_data(tx_out_data), .busy(), .done(txp_done),
    .underrun(tx_underrun), .tap_scr_valid(tap_scr_v), .tap_scr_bit(tap_scr_b),
    .tap_il_valid(tap_il_v), .tap_il_bit(tap_il_b), .tap_map_valid(tap_map_v),
    .tap_map_data(tap_map_d));
  assign tx_done = txp_done;

  // ---------------- receiver ----------------
  logic  r_in_valid, tg_valid, tg_busy, tg_done;
  cplx_t r_in_data, tg_data;
  logic  tap_eq_v, tap_di_v, tap_di_b, tap_dec_v, tap_dec_b, rx_sig_valid;
  cplx_t tap_eq_d;

  rx_tpg #(.RATE(BIST_RX_RATE), .LENGTH(BIST_RX_LEN), .NSYM(BIST_RX_NSYM)) u_rx_tpg (
    .clk, .rst_n, .start(bist_go && bist_sel), .tick, .out_valid(tg_valid), .out_data(tg_data),
    .busy(tg_busy), .done(tg_done));

  assign r_in_valid = bist_rx ? tg_valid : rx_in_valid;
  assign r_in_data  = bist_rx ? tg_data  : rx_in_data;

  receiver u_rx (
    .clk_trk(gclk_trk), .clk_proc(gclk_proc), .rst_n, .in_valid(r_in_valid), .in_data(r_in_data),
    .trk_restart, .detected, .proc_start, .fft_in_valid(r_fin_valid),
    .fft_in_ready(f_in_ready && !tx_mode), .fft_in_data(r_fin_data),
    .fft_out_valid(f_out_valid && !f_out_inv), .fft_out_ready(r_fout_ready),
    .fft_out_data(f_out_data), .byte_valid(rx_byte_valid), .byte_data(rx_byte), .rx_rate,
    .rx_length, .signal_valid(rx_sig_valid), .frame_done(rx_done), .frame_fail(rx_fail),
    .timing_found(rx_timing_found), .h_update(rx_h_update), .tap_eq_valid(tap_eq_v),
    .tap_eq_data(tap_eq_d), .tap_di_valid(tap_di_v), .tap_di_bit(tap_di_b),
    .tap_dec_valid(tap_dec_v), .tap_dec_bit(tap_dec_b));
  assign rx_end = rx_done || rx_fail;

  // ---------------- BIST signature collection ----------------
  logic [3:0]  tx_tv, rx_tv;
  logic [31:0] tx_td [4];
  logic [31:0] rx_td [4];
  logic        tx_ok, rx_ok, tx_bbusy, rx_bbusy;
  logic [15:0] tx_sig [4];
  logic [15:0] rx_sig [4];

  assign tx_tv = {tx_out_valid, tap_map_v, tap_il_v, tap_scr_v};
  assign tx_td[0] = {31'b0, tap_scr_b};
  assign tx_td[1] = {31'b0, tap_il_b};
  assign tx_td[2] = tap_map_d;
  assign tx_td[3] = tx_out_data;
  assign rx_tv = {tap_dec_v, tap_di_v, tap_eq_v, r_fin_valid};
  assign rx_td[0] = r_fin_data;
  assign rx_td[1] = tap_eq_d;
  assign rx_td[2] = {31'b0, tap_di_b};
  assign rx_td[3] = {31'b0, tap_dec_b};

  bist_ctrl #(.EXP0(TX_SIG0), .EXP1(TX_SIG1), .EXP2(TX_SIG2), .EXP3(TX_SIG3)) u_tx_bist (
    .clk, .rst_n, .start(bist_go && !bist_sel), .run(bist_tx), .test_done(txp_done && bist_tx),
    .tap_valid(tx_tv), .tap_data(tx_td), .busy(tx_bbusy), .bist_ok(tx_ok), .sig(tx_sig));
  bist_ctrl #(.EXP0(RX_SIG0), .EXP1(RX_SIG1), .EXP2(RX_SIG2), .EXP3(RX_SIG3)) u_rx_bist (
    .clk, .rst_n, .start(bist_go && bist_sel), .run(bist_rx), .test_done(rx_end && bist_rx && !tg_busy),
    .tap_valid(rx_tv), .tap_data(rx_td), .busy(rx_bbusy), .bist_ok(rx_ok), .sig(rx_sig));

  assign bist_ok   = bist_sel ? rx_ok : tx_ok;
  assign bist_busy = tx_bbusy || rx_bbusy;
endmodule
