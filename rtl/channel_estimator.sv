// channel_estimator: decision-directed channel estimation and equalisation.
//
// Symbols arrive from the FFT as 64 bins in order k = -32..31. The first
// symbol of a frame is the second long training symbol: it gives the
// initial estimate H[k] = Y[k] * L[k] (L = +-1). Every later symbol
// (SIGNAL, then DATA) is equalised: each of the 48 data bins is divided by
// its current estimate in the division unit (cdiv), X^ = Y / H, and the
// result is queued for the demapper together with its rate and block-end
// flag. The received values Y are also kept in the CE buffer, a FIFO of
// YBUF_DEPTH entries. The decoded bits come back re-encoded, re-interleaved
// and re-mapped as reference points X on 'ref_*'; for each one the oldest
// buffered Y is popped and a second division unit forms the fresh estimate
// H[k] = Y / X, which replaces the old one. So symbol i's estimate corrects
// symbol i + D, D being the delay of the decode/re-encode loop.
//
// A symbol is only accepted when the output queue and the CE buffer have
// room for it, and DATA symbols only once the SIGNAL field has been decoded
// ('rate_valid'); otherwise the FFT holds its output (in_ready low).
// Estimation method and the division unit follow the reference architecture. The residual
// phase correction from the pilots is not included; buffer depths and
// widths are this design's choices.
module channel_estimator
  import bb_pkg::*;
#(
  parameter int QDEPTH     = 128,   // equalised-point queue (two symbols)
  parameter int YBUF_DEPTH = 256    // CE buffer (received data bins)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,          // new frame
  input  logic       in_valid,
  output logic       in_ready,
  input  cplx_t      in_data,
  input  rate_info_t rate,           // DATA rate, decoded from SIGNAL
  input  logic       rate_valid,
  input  logic [9:0] n_sym,          // SIGNAL + DATA symbols
  input  logic       n_sym_valid,
  output logic       out_valid,
  input  logic       out_ready,
  output cplx_t      out_data,
  output logic       out_last,
  output rate_info_t out_rate,
  input  logic       ref_valid,
  input  cplx_t      ref_data,
  output logic       h_update,       // pulses for every decision-directed update
  output logic       ybuf_overflow
);
  cplx_t      H [64];
  logic [5:0] bin;
  logic [9:0] sym;
  logic       active;                // inside a symbol
  logic [7:0] inflight;
  logic       is_data, take;
  int         k;
  logic [5:0] dcnt;                  // data bin within symbol

  localparam int QAW = $clog2(QDEPTH + 1);
  localparam int YAW = $clog2(YBUF_DEPTH + 1);
  logic [QAW-1:0] q_level;
  logic [YAW-1:0] y_level;
  logic           can_start;

  always_comb begin
    k = int'(bin) - 32;
    is_data = (k >= -26 && k <= 26 && k != 0 && k != -21 && k != -7 && k != 7 && k != 21);
  end

  assign can_start = (sym == 0) ||
                     ((sym == 1 || rate_valid) &&
                      (32'(q_level) + 32'(inflight) + 48 <= QDEPTH) &&
                      (32'(y_level) + 48 <= YBUF_DEPTH));
  assign in_ready = active || can_start;
  assign take     = in_valid && in_ready;

  // equaliser
  logic  eq_valid, eq_last_in, eq_sig_in;
  cplx_t eq_q;
  logic [1:0] eq_tag;
  assign eq_last_in = (dcnt == 6'd47) && ((sym == 1) || (n_sym_valid && sym == n_sym));
  assign eq_sig_in  = (sym == 1);

  // The division pipelines are not flushed at 'start': a result left in
  // them when the clock was gated comes out during the training symbol
  // (sym 0) of the next frame and is dropped.
  logic eq_pipe_valid, up_pipe_valid;
  cdiv #(.TW(2)) u_eq (
    .clk, .rst_n, .in_valid(take && is_data && sym != 0), .a(in_data), .b(H[bin]),
    .in_tag({eq_sig_in, eq_last_in}), .out_valid(eq_pipe_valid), .q(eq_q), .out_tag(eq_tag));
  assign eq_valid = eq_pipe_valid && sym != 0;

  // output queue: {signal symbol, last, point}
  logic [33:0] q_out;
  logic        q_in_ready;
  sync_fifo #(.WIDTH(34), .DEPTH(QDEPTH)) u_q (
    .clk, .rst_n, .clear(start), .in_valid(eq_valid), .in_ready(q_in_ready), .in_data({eq_tag, eq_q}),
    .out_valid, .out_ready, .out_data(q_out), .level(q_level));
  assign out_data = cplx_t'(q_out[31:0]);
  assign out_last = q_out[32];
  assign out_rate = q_out[33] ? rate_info(4'b1101) : rate;

  // CE buffer
  logic  y_out_valid;
  cplx_t y_out;
  logic [31:0] y_raw;
  logic  y_in_ready;
  sync_fifo #(.WIDTH(32), .DEPTH(YBUF_DEPTH)) u_ybuf (
    .clk, .rst_n, .clear(start), .in_valid(take && is_data && sym != 0), .in_ready(y_in_ready), .in_data(in_data),
    .out_valid(y_out_valid), .out_ready(ref_valid), .out_data(y_raw), .level(y_level));
  assign y_out = cplx_t'(y_raw);

  // decision-directed update: H = Y / X at the bin of the reference
  logic [5:0] rd;                    // data index of the next reference
  logic       up_valid;
  cplx_t      up_q;
  logic [5:0] up_bin;
  cdiv #(.TW(6)) u_up (
    .clk, .rst_n, .in_valid(ref_valid && y_out_valid), .a(y_out), .b(ref_data),
    .in_tag(6'(data_sc(int'(rd)) + 32)), .out_valid(up_pipe_valid), .q(up_q), .out_tag(up_bin));
  assign up_valid = up_pipe_valid && sym != 0;
  assign h_update = up_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bin <= '0; sym <= '0; active <= 1'b0; inflight <= '0; dcnt <= '0; rd <= '0;
      ybuf_overflow <= 1'b0;
      for (int i = 0; i < 64; i++) H[i] <= '0;
    end else if (start) begin
      bin <= '0; sym <= '0; active <= 1'b0; inflight <= '0; dcnt <= '0; rd <= '0;
      ybuf_overflow <= 1'b0;
    end else begin
      inflight <= inflight + ((take && is_data && sym != 0) ? 8'd1 : 8'd0) - (eq_valid ? 8'd1 : 8'd0);
      if (ref_valid) rd <= (rd == 6'd47) ? '0 : rd + 1'b1;
      if (ref_valid && !y_out_valid) ybuf_overflow <= 1'b1;   // reference without a buffered Y
      if (up_valid) H[up_bin] <= up_q;
      if (take) begin
        bin <= bin + 1'b1;
        active <= (bin != 6'd63);
        if (is_data) dcnt <= (dcnt == 6'd47) ? '0 : dcnt + 1'b1;
        if (sym == 0 && lts_val(k) != 0) begin
          H[bin].re <= (lts_val(k) > 0) ? in_data.re : -in_data.re;
          H[bin].im <= (lts_val(k) > 0) ? in_data.im : -in_data.im;
        end
        if (bin == 6'd63) sym <= sym + 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) eq_valid |-> q_in_ready);
  assert property (@(posedge clk) disable iff (!rst_n) (take && is_data && sym != 0) |-> y_in_ready);
endmodule
