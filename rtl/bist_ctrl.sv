// bist_ctrl: one BIST domain (transmitter or receiver). Holds the four test
// data extractors, three on internal taps and one on the output, and
// reports on the single 'bist_ok' line.
// 'start' clears the extractors; while 'run' is high they collect their
// taps; 'test_done' ends the test. Then each signature is compared with its
// expected value and 'bist_ok' gives, in three slots of two cycles, a
// one-cycle pulse for each internal extractor that matches (no pulse for a
// mismatch), and finally holds the level of the output extractor's result
// until the next start. 'busy' is high from start to the final level.
// One-bit reporting with pulses and a final level follows the reference architecture; the
// slot timing and the expected values (those of a fault-free run of this
// RTL with the built-in stimulus) are this design's.
module bist_ctrl #(
  parameter logic [15:0] EXP0 = 16'h0000,
  parameter logic [15:0] EXP1 = 16'h0000,
  parameter logic [15:0] EXP2 = 16'h0000,
  parameter logic [15:0] EXP3 = 16'h0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        run,
  input  logic        test_done,
  input  logic [3:0]  tap_valid,
  input  logic [31:0] tap_data [4],
  output logic        busy,
  output logic        bist_ok,
  output logic [15:0] sig [4]
);
  for (genvar i = 0; i < 4; i++) begin : g_tde
    tde_misr #(.W(16), .DW(32)) u_tde (
      .clk, .rst_n, .clear(start), .en(run && tap_valid[i]), .data(tap_data[i]), .sig(sig[i]));
  end

  logic [3:0] match;
  assign match = {sig[3] == EXP3, sig[2] == EXP2, sig[1] == EXP1, sig[0] == EXP0};

  typedef enum logic [1:0] {B_IDLE, B_RUN, B_REPORT, B_HOLD} bst_e;
  bst_e       bst;
  logic [2:0] slot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bst <= B_IDLE; slot <= '0; bist_ok <= 1'b0;
    end else if (start) begin
      bst <= B_RUN; slot <= '0; bist_ok <= 1'b0;
    end else begin
      unique case (bst)
        B_RUN:    if (test_done) begin bst <= B_REPORT; slot <= '0; end
        B_REPORT: begin
          slot <= slot + 1'b1;
          bist_ok <= (slot[0] == 1'b0) && match[slot[2:1]];
          if (slot == 3'd5) bst <= B_HOLD;
        end
        B_HOLD:   bist_ok <= match[3];
        default:  bist_ok <= 1'b0;
      endcase
    end
  end
  assign busy = (bst == B_RUN) || (bst == B_REPORT);
endmodule
