// synchronizer: receive synchronisation, split into two mutually exclusive
// paths that run on separately gated clocks.
//
// Tracking path (clk_trk): a lag-16 autocorrelator feeds the plateau
// detector; when the plateau is found, a vectoring CORDIC turns the held
// correlation into its angle, and the carrier offset per sample
// (angle / 16) is latched. 'detected' then stays high until 'restart'.
//
// Processing path (clk_proc, started by 'start'): an NCO (phase accumulator
// plus rotation-mode CORDIC) removes the offset from every sample; the XNOR
// cross-correlator finds the end of the first long training symbol
// (score >= XTHR). From there the path reorders the stream for the FFT: the
// next 64 samples (second long symbol, the reference for the channel
// estimate, symbol 0), then for each following 80-sample symbol the 64
// samples after the guard interval (symbol 1 = SIGNAL, 2.. = DATA). It stops
// after symbol n_sym once n_sym is known ('done'), or with 'fail' when no
// timing peak comes within TIMEOUT samples. 'abort' stops it at once.
//
// Samples arrive with in_valid (the 20 MHz sample strobe). Outputs go to the
// FFT input buffer, which always has room at this rate. The split into
// tracking and processing paths and the components used follow the reference architecture;
// thresholds, widths and the use of the second long symbol alone as the
// reference are this design's choices.
module synchronizer
  import bb_pkg::*;
#(
  parameter int XTHR    = 96,
  parameter int TIMEOUT = 480
) (
  input  logic        clk_trk,
  input  logic        clk_proc,
  input  logic        rst_n,
  input  logic        in_valid,
  input  cplx_t       in_data,
  // tracking path
  input  logic        restart,
  output logic        detected,
  output logic [15:0] cfo_step,     // phase advance per sample, 2**16 = turn
  // processing path
  input  logic        start,
  input  logic        abort,
  input  logic [9:0]  n_sym,        // SIGNAL + DATA symbols
  input  logic        n_sym_valid,
  output logic        out_valid,
  input  logic        out_ready,
  output cplx_t       out_data,
  output logic [9:0]  out_sym,      // 0 = reference (long training)
  output logic        timing_found,
  output logic        done,
  output logic        fail
);
  // ---------------- tracking path ----------------
  localparam int CW = 30;
  logic                 ac_valid, pd_detect;
  logic signed [CW-1:0] c_re, c_im, cq_re, cq_im;
  logic        [CW-1:0] c_p;
  logic                 on_plat;
  logic signed [15:0]   v_x, v_y, vo_x, vo_y;
  logic [15:0]          vo_z;
  logic                 v_valid, vo_valid;

  autocorrelator #(.LAG(16), .WIN(16), .DW(12)) u_ac (
    .clk(clk_trk), .rst_n, .clear(restart), .in_valid, .in_data,
    .out_valid(ac_valid), .c_re, .c_im, .p(c_p));

  plateau_detector #(.CW(CW)) u_pd (
    .clk(clk_trk), .rst_n, .clear(restart || detected), .in_valid(ac_valid),
    .c_re, .c_im, .p(c_p), .detect(pd_detect), .c_re_q(cq_re), .c_im_q(cq_im),
    .on_plateau(on_plat));

  // normalise the held correlation to 16 bits for the CORDIC
  always_comb begin
    int sh;
    sh = 0;
    for (int s = CW - 16; s >= 0; s--)
      if ((cq_re >>> s) > 32000 || (cq_re >>> s) < -32000 ||
          (cq_im >>> s) > 32000 || (cq_im >>> s) < -32000) begin
        if (sh == 0) sh = s + 1;
      end
    v_x = 16'(cq_re >>> sh);
    v_y = 16'(cq_im >>> sh);
  end

  always_ff @(posedge clk_trk or negedge rst_n)
    if (!rst_n) v_valid <= 1'b0;
    else        v_valid <= pd_detect;

  cordic #(.VECTOR(1'b1)) u_vec (
    .clk(clk_trk), .rst_n, .in_valid(v_valid), .in_x(v_x), .in_y(v_y), .in_z(16'h0),
    .out_valid(vo_valid), .out_x(vo_x), .out_y(vo_y), .out_z(vo_z));

  always_ff @(posedge clk_trk or negedge rst_n) begin
    if (!rst_n) begin
      detected <= 1'b0; cfo_step <= '0;
    end else if (restart) begin
      detected <= 1'b0;
    end else if (vo_valid && !detected) begin
      detected <= 1'b1;
      cfo_step <= 16'($signed(vo_z) >>> 4);
    end
  end

  // ---------------- processing path ----------------
  logic [15:0] phase;
  logic        n_valid;
  cplx_t       n_data;
  logic        x_valid;
  logic [8:0]  score;
  cplx_t       d1;                 // sample aligned with its score
  logic        run;

  always_ff @(posedge clk_proc or negedge rst_n) begin
    if (!rst_n)                 phase <= '0;
    else if (start)             phase <= '0;
    else if (in_valid && run)   phase <= phase + cfo_step;
  end

  cordic #(.VECTOR(1'b0)) u_nco (
    .clk(clk_proc), .rst_n, .in_valid(in_valid && run), .in_x(in_data.re), .in_y(in_data.im),
    .in_z(-phase), .out_valid(n_valid), .out_x(n_data.re), .out_y(n_data.im), .out_z());

  xcorr_xnor u_xc (
    .clk(clk_proc), .rst_n, .clear(start), .in_valid(n_valid), .in_data(n_data),
    .out_valid(x_valid), .score);

  always_ff @(posedge clk_proc) if (n_valid) d1 <= n_data;

  typedef enum logic [1:0] {P_IDLE, P_SEARCH, P_SYM} pst_e;
  pst_e        pst;
  logic [9:0]  tcnt;
  logic [6:0]  pos;
  logic [9:0]  sym;
  logic        take;

  assign run  = (pst != P_IDLE);
  assign take = (pst == P_SYM) && ((sym == 0) || (pos >= 7'd16));
  assign out_valid = x_valid && take;
  assign out_data  = d1;
  assign out_sym   = sym;

  always_ff @(posedge clk_proc or negedge rst_n) begin
    if (!rst_n) begin
      pst <= P_IDLE; tcnt <= '0; pos <= '0; sym <= '0; timing_found <= 1'b0;
      done <= 1'b0; fail <= 1'b0;
    end else if (start) begin
      pst <= P_SEARCH; tcnt <= '0; pos <= '0; sym <= '0; timing_found <= 1'b0;
      done <= 1'b0; fail <= 1'b0;
    end else if (abort) begin
      pst <= P_IDLE;
    end else if (x_valid) begin
      unique case (pst)
        P_SEARCH: begin
          tcnt <= tcnt + 1'b1;
          if (score >= 9'(XTHR)) begin
            pst <= P_SYM; pos <= '0; sym <= '0; timing_found <= 1'b1;
          end else if (tcnt == 10'(TIMEOUT)) begin
            pst <= P_IDLE; fail <= 1'b1;
          end
        end
        P_SYM: begin
          if ((sym == 0 && pos == 7'd63) || pos == 7'd79) begin
            pos <= '0;
            if (n_sym_valid && sym == n_sym) begin pst <= P_IDLE; done <= 1'b1; end
            else sym <= sym + 1'b1;
          end else pos <= pos + 1'b1;
        end
        default: ;
      endcase
    end
  end

  // the FFT input buffer must never refuse a sample
  assert property (@(posedge clk_proc) disable iff (!rst_n) out_valid |-> out_ready);
endmodule
