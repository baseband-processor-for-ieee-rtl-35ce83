// receiver: the 802.11a receive datapath and its frame controller.
//
//   samples -> synchronizer (tracking | processing) -> FFT (shared,
//   outside) -> channel estimator / equaliser -> demapper -> deinterleaver
//   -> Viterbi decoder -> descrambler -> PSDU bytes
//
// The decoded bits also run back through a second encoder, interleaver and
// mapper, rebuilding the transmitted points; these are the reference
// decisions of the decision-directed channel estimator.
// The first decoded block is the SIGNAL field: the controller checks its
// parity and RATE, computes the number of DATA symbols,
// ceil((16 + 8*LENGTH + 6) / N_DBPS), by repeated addition, and releases the
// DATA symbols. DATA bits are descrambled (seed taken from the SERVICE
// field), the 16 SERVICE bits are dropped and the PSDU leaves as bytes
// (LSB first) on 'byte_valid'. 'frame_done' rises after the last byte,
// 'frame_fail' when timing is not found or the SIGNAL field is invalid.
// The tracking part of the synchronizer runs on clk_trk, the rest on
// clk_proc (both gated copies of one 80 MHz clock); 'proc_start' starts a
// frame. Which blocks exist follows the reference architecture; the control is this
// design's.
module receiver
  import bb_pkg::*;
(
  input  logic        clk_trk,
  input  logic        clk_proc,
  input  logic        rst_n,
  input  logic        in_valid,
  input  cplx_t       in_data,
  input  logic        trk_restart,
  output logic        detected,
  input  logic        proc_start,
  // shared FFT
  output logic        fft_in_valid,
  input  logic        fft_in_ready,
  output cplx_t       fft_in_data,
  input  logic        fft_out_valid,
  output logic        fft_out_ready,
  input  cplx_t       fft_out_data,
  // PSDU
  output logic        byte_valid,
  output logic [7:0]  byte_data,
  output logic [3:0]  rx_rate,
  output logic [11:0] rx_length,
  output logic        signal_valid,
  output logic        frame_done,
  output logic        frame_fail,
  // events and taps
  output logic        timing_found,
  output logic        h_update,
  output logic        tap_eq_valid,
  output cplx_t       tap_eq_data,
  output logic        tap_di_valid,
  output logic        tap_di_bit,
  output logic        tap_dec_valid,
  output logic        tap_dec_bit
);
  logic [9:0] n_sym;
  logic       n_sym_valid;
  rate_info_t ri;
  logic       sync_done, sync_fail, abort;

  synchronizer u_sync (
    .clk_trk, .clk_proc, .rst_n, .in_valid, .in_data, .restart(trk_restart), .detected,
    .cfo_step(), .start(proc_start), .abort, .n_sym, .n_sym_valid,
    .out_valid(fft_in_valid), .out_ready(fft_in_ready), .out_data(fft_in_data), .out_sym(),
    .timing_found, .done(sync_done), .fail(sync_fail));

  // channel estimator
  logic       eq_valid, eq_ready, eq_last;
  cplx_t      eq_data;
  rate_info_t eq_rate;
  logic       ref_valid;
  cplx_t      ref_data;
  channel_estimator u_ce (
    .clk(clk_proc), .rst_n, .start(proc_start), .in_valid(fft_out_valid), .in_ready(fft_out_ready),
    .in_data(fft_out_data), .rate(ri), .rate_valid(signal_valid), .n_sym, .n_sym_valid,
    .out_valid(eq_valid), .out_ready(eq_ready), .out_data(eq_data), .out_last(eq_last),
    .out_rate(eq_rate), .ref_valid, .ref_data, .h_update, .ybuf_overflow());
  assign tap_eq_valid = eq_valid && eq_ready;
  assign tap_eq_data  = eq_data;

  logic       dm_valid, dm_ready, dm_bit, dm_last;
  rate_info_t dm_rate;
  demapper u_dm (
    .clk(clk_proc), .rst_n, .clear(proc_start), .in_valid(eq_valid), .in_ready(eq_ready), .in_data(eq_data),
    .in_last(eq_last), .in_rate(eq_rate), .out_valid(dm_valid), .out_ready(dm_ready),
    .out_bit(dm_bit), .out_last(dm_last), .out_rate(dm_rate));

  logic       di_valid, di_ready, di_bit, di_last;
  rate_info_t di_rate;
  interleaver #(.DEINT(1'b1)) u_di (
    .clk(clk_proc), .rst_n, .clear(proc_start), .in_valid(dm_valid), .in_ready(dm_ready), .in_bit(dm_bit),
    .in_last(dm_last), .in_rate(dm_rate), .out_valid(di_valid), .out_ready(di_ready),
    .out_bit(di_bit), .out_last(di_last), .out_rate(di_rate));
  assign tap_di_valid = di_valid && di_ready;
  assign tap_di_bit   = di_bit;

  logic v_valid, v_bit, v_last;
  viterbi_decoder u_vit (
    .clk(clk_proc), .rst_n, .init(proc_start), .in_valid(di_valid), .in_ready(di_ready),
    .in_bit(di_bit), .in_last(di_last), .in_rate(di_rate), .out_valid(v_valid), .out_bit(v_bit),
    .out_last(v_last));

  // ---------------- frame controller ----------------
  logic        in_data_blk;       // decoding the DATA block
  logic [23:0] sig;
  logic [4:0]  sig_cnt;
  logic        sig_ok;
  logic [16:0] nbits, acc;
  logic        calc;
  logic [16:0] didx;
  logic [7:0]  sh;
  logic [11:0] bcnt;

  assign ri = rate_info(rx_rate);

  always_comb begin
    logic [23:0] s;
    s = {v_bit, sig[23:1]};       // the 24th bit completes the field
    sig_ok = (^s[17:0] == 1'b0) && rate_info({s[0], s[1], s[2], s[3]}).valid && (s[16:5] != 0);
  end

  // descrambler on the DATA block
  logic ds_bit;
  scrambler #(.DESCRAMBLE(1'b1)) u_dsc (
    .clk(clk_proc), .rst_n, .init(proc_start), .seed(7'h00), .in_valid(v_valid && in_data_blk),
    .in_ready(), .in_bit(v_bit), .out_valid(), .out_ready(1'b1), .out_bit(ds_bit));
  assign tap_dec_valid = v_valid && in_data_blk;
  assign tap_dec_bit   = ds_bit;

  always_ff @(posedge clk_proc or negedge rst_n) begin
    if (!rst_n) begin
      in_data_blk <= 1'b0; sig <= '0; sig_cnt <= '0; signal_valid <= 1'b0; rx_rate <= 4'b1101;
      rx_length <= '0; n_sym <= '0; n_sym_valid <= 1'b0; nbits <= '0; acc <= '0; calc <= 1'b0;
      didx <= '0; sh <= '0; bcnt <= '0; byte_valid <= 1'b0; byte_data <= '0;
      frame_done <= 1'b0; frame_fail <= 1'b0; abort <= 1'b0;
    end else if (proc_start) begin
      in_data_blk <= 1'b0; sig_cnt <= '0; signal_valid <= 1'b0; n_sym_valid <= 1'b0; calc <= 1'b0;
      didx <= '0; bcnt <= '0; byte_valid <= 1'b0; frame_done <= 1'b0; frame_fail <= 1'b0;
      abort <= 1'b0;
    end else begin
      byte_valid <= 1'b0;
      if (sync_fail) begin frame_fail <= 1'b1; abort <= 1'b1; end
      // SIGNAL block
      if (v_valid && !in_data_blk) begin
        sig <= {v_bit, sig[23:1]};
        sig_cnt <= sig_cnt + 1'b1;
        if (v_last) begin
          in_data_blk <= 1'b1;
          if (sig_ok) begin
            signal_valid <= 1'b1;
            rx_rate   <= {sig[1], sig[2], sig[3], sig[4]};
            rx_length <= sig[17:6];
            nbits <= 17'd22 + {2'b00, sig[17:6], 3'b000};
            acc <= '0; n_sym <= 10'd1; calc <= 1'b1;
          end else begin
            frame_fail <= 1'b1; abort <= 1'b1;
          end
        end
      end
      // number of symbols by repeated addition
      if (calc) begin
        if (acc >= nbits) begin calc <= 1'b0; n_sym_valid <= 1'b1; end
        else begin acc <= acc + 17'(ri.ndbps); n_sym <= n_sym + 1'b1; end
      end
      // DATA block: drop SERVICE, pack bytes
      if (v_valid && in_data_blk) begin
        didx <= didx + 1'b1;
        if (didx >= 17'd16 && bcnt != rx_length) begin
          sh <= {ds_bit, sh[7:1]};
          if (didx[2:0] == 3'd7) begin
            byte_valid <= 1'b1; byte_data <= {ds_bit, sh[7:1]}; bcnt <= bcnt + 1'b1;
            if (bcnt + 1'b1 == rx_length) frame_done <= 1'b1;
          end
        end
      end
    end
  end

  // ---------------- re-encoding loop for the channel estimate ----------------
  logic       rf_valid, rf_ready;
  logic [2:0] rf_data;            // {data block, last, bit}
  logic       blk_first;
  always_ff @(posedge clk_proc or negedge rst_n)
    if (!rst_n)          blk_first <= 1'b1;
    else if (proc_start) blk_first <= 1'b1;
    else if (v_valid)    blk_first <= v_last;

  logic [3:0] rf_out;
  logic       rf_in_ready;
  sync_fifo #(.WIDTH(4), .DEPTH(64)) u_rf (
    .clk(clk_proc), .rst_n, .clear(proc_start), .in_valid(v_valid), .in_ready(rf_in_ready),
    .in_data({in_data_blk, blk_first, v_last, v_bit}),
    .out_valid(rf_valid), .out_ready(rf_ready), .out_data(rf_out), .level());
  assign rf_data = rf_out[2:0];

  logic       re_valid, re_ready, re_bit, re_last;
  rate_info_t re_rate;
  conv_encoder u_reenc (
    .clk(clk_proc), .rst_n, .clear(proc_start), .in_valid(rf_valid), .in_ready(rf_ready), .in_bit(rf_out[0]),
    .in_first(rf_out[2]), .in_last(rf_out[1]), .in_rate(rf_out[3] ? ri : rate_info(4'b1101)),
    .out_valid(re_valid), .out_ready(re_ready), .out_bit(re_bit), .out_last(re_last),
    .out_rate(re_rate));

  logic       ri_valid, ri_ready, ri_bit, ri_last;
  rate_info_t ri_rate;
  interleaver #(.DEINT(1'b0)) u_reil (
    .clk(clk_proc), .rst_n, .clear(proc_start), .in_valid(re_valid), .in_ready(re_ready), .in_bit(re_bit),
    .in_last(re_last), .in_rate(re_rate), .out_valid(ri_valid), .out_ready(ri_ready),
    .out_bit(ri_bit), .out_last(ri_last), .out_rate(ri_rate));

  mapper u_remap (
    .clk(clk_proc), .rst_n, .clear(proc_start), .in_valid(ri_valid), .in_ready(ri_ready), .in_bit(ri_bit),
    .in_last(ri_last), .in_rate(ri_rate), .out_valid(ref_valid), .out_ready(1'b1),
    .out_data(ref_data), .out_last());

  assert property (@(posedge clk_proc) disable iff (!rst_n) v_valid |-> rf_in_ready);
endmodule
