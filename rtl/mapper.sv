// mapper: 802.11a Gray constellation mapper (BPSK, QPSK, 16-QAM, 64-QAM).
// Collects N_BPSC coded bits (one per clock), then offers one complex
// point, scaled by the standard's normalisation (1, 1/sqrt2, 1/sqrt10,
// 1/sqrt42) times FREQ_ONE. The first half of the bits selects I, the
// second half Q; within a half the first bit is the sign
// (0 -> negative), as in the standard's tables. A block's 'last' flag
// follows its final point.
module mapper
  import bb_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,          // synchronous flush (new frame)
  input  logic       in_valid,
  output logic       in_ready,
  input  logic       in_bit,
  input  logic       in_last,
  input  rate_info_t in_rate,
  output logic       out_valid,
  input  logic       out_ready,
  output cplx_t      out_data,
  output logic       out_last
);
  logic [5:0] bits;             // bits[0] = first bit
  logic [2:0] cnt;
  logic       full, last_q;
  mod_e       modq;

  // 64-QAM magnitude from the second and third bit of an axis:
  // 10 -> 1, 11 -> 3, 01 -> 5, 00 -> 7
  function automatic int mag8(input logic [1:0] b12);
    unique case (b12)
      2'b10:   return 1;
      2'b11:   return 3;
      2'b01:   return 5;
      default: return 7;
    endcase
  endfunction

  // Gray level for one axis: returns an odd level -7..7; g[0] is the
  // first (sign) bit
  function automatic int level(input logic [2:0] g, input int nb);
    unique case (nb)
      1:       return g[0] ? 1 : -1;
      2:       return g[0] ? (g[1] ? 1 : 3) : (g[1] ? -1 : -3);
      default: return g[0] ? mag8({g[1], g[2]}) : -mag8({g[1], g[2]});
    endcase
  endfunction

  always_comb begin
    int li, lq, k;
    li = 0; lq = 0; k = FREQ_ONE;
    unique case (modq)
      MOD_BPSK:  begin li = level({2'b0, bits[0]}, 1); lq = 0; k = 8192; end
      MOD_QPSK:  begin li = level({2'b0, bits[0]}, 1); lq = level({2'b0, bits[1]}, 1); k = 5793; end
      MOD_QAM16: begin li = level({1'b0, bits[1], bits[0]}, 2); lq = level({1'b0, bits[3], bits[2]}, 2); k = 2591; end
      default:   begin li = level({bits[2], bits[1], bits[0]}, 3); lq = level({bits[5], bits[4], bits[3]}, 3); k = 1264; end
    endcase
    out_data.re = sample_t'(li * k);
    out_data.im = sample_t'(lq * k);
  end

  assign out_valid = full;
  assign out_last  = last_q;
  assign in_ready  = !full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits <= '0; cnt <= '0; full <= 1'b0; last_q <= 1'b0; modq <= MOD_BPSK;
    end else if (clear) begin
      cnt <= '0; full <= 1'b0;
    end else begin
      if (full && out_ready) full <= 1'b0;
      if (in_valid && in_ready) begin
        bits[cnt] <= in_bit;
        if (cnt == 3'(in_rate.nbpsc - 1)) begin
          cnt <= '0; full <= 1'b1; last_q <= in_last; modq <= in_rate.modu;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
