// scrambler: 802.11a frame-synchronous scrambler, S(x) = x^7 + x^4 + 1,
// one bit per clock with a valid/ready handshake (a pass-through stage,
// ready follows the downstream ready).
// Transmit use (DESCRAMBLE=0): 'init' loads 'seed' and every data bit is
// XORed with the sequence. Receive use (DESCRAMBLE=1): after 'init' the first
// 7 received bits are the first 7 SERVICE bits, which are zero before
// scrambling, so they are the sequence itself; they are shifted into the
// state (output as 0) and descrambling runs from the 8th bit on.
// The polynomial and the seed recovery follow the standard; the handshake is
// this design's choice.
module scrambler #(
  parameter bit DESCRAMBLE = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       init,       // start of a frame
  input  logic [6:0] seed,       // transmit initial state (non-zero)
  input  logic       in_valid,
  output logic       in_ready,
  input  logic       in_bit,
  output logic       out_valid,
  input  logic       out_ready,
  output logic       out_bit
);
  import bb_pkg::*;
  logic [6:0] st;
  logic [2:0] sync_cnt;      // receive: sequence bits still to capture
  logic       seqb;
  logic       fire;

  assign seqb      = st[6] ^ st[3];
  assign in_ready  = out_ready;
  assign out_valid = in_valid;
  assign fire      = in_valid && out_ready;
  assign out_bit   = (DESCRAMBLE && sync_cnt != 0) ? 1'b0 : in_bit ^ seqb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= 7'h7f; sync_cnt <= '0;
    end else if (init) begin
      st <= DESCRAMBLE ? 7'h00 : seed;
      sync_cnt <= DESCRAMBLE ? 3'd7 : 3'd0;
    end else if (fire) begin
      if (DESCRAMBLE && sync_cnt != 0) begin
        st <= {st[5:0], in_bit};
        sync_cnt <= sync_cnt - 1'b1;
      end else begin
        st <= scr_next(st);
      end
    end
  end
endmodule
