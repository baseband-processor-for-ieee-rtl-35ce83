// power_ctrl: decides which clock domains toggle. Runs on the ungated clock.
//   * Receive search (default): only the tracking synchronizer domain runs.
//   * When the tracking path reports a frame ('detected'), tracking is
//     stopped and the receive processing domain and the FFT domain start;
//     'proc_start' is raised in the first cycle they run.
//   * When the frame ends ('rx_end'), processing and FFT stop, tracking
//     restarts ('trk_restart' in its first cycle).
//   * 'tx_req' (accepted when no frame is being received) runs the transmit
//     and FFT domains until 'tx_end'; 'tx_start' is raised in their first
//     cycle.
// The enables are registered, so a domain's clock starts one cycle after
// its enable is set; the start pulses are timed to that first edge.
// Which domains exist and when they run follows the reference architecture; the sequencing
// details are this design's.
module power_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic tx_req,
  input  logic tx_end,
  input  logic detected,
  input  logic rx_end,
  output logic en_tx,
  output logic en_fft,
  output logic en_trk,
  output logic en_proc,
  output logic tx_start,
  output logic proc_start,
  output logic trk_restart,
  output logic tx_mode
);
  typedef enum logic [1:0] {M_SEARCH, M_RX, M_TX} mode_e;
  mode_e mode;
  logic  first;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode <= M_SEARCH; first <= 1'b1;
    end else begin
      first <= 1'b0;
      unique case (mode)
        M_SEARCH: if (tx_req) begin mode <= M_TX; first <= 1'b1; end
                  else if (detected && !first) begin mode <= M_RX; first <= 1'b1; end
        M_RX:     if (rx_end && !first) begin mode <= M_SEARCH; first <= 1'b1; end
        default:  if (tx_end && !first) begin mode <= M_SEARCH; first <= 1'b1; end
      endcase
    end
  end

  assign en_trk      = (mode == M_SEARCH);
  assign en_proc     = (mode == M_RX);
  assign en_tx       = (mode == M_TX);
  assign en_fft      = (mode != M_SEARCH);
  assign tx_mode     = (mode == M_TX);
  assign tx_start    = first && mode == M_TX;
  assign proc_start  = first && mode == M_RX;
  assign trk_restart = first && mode == M_SEARCH;
endmodule
