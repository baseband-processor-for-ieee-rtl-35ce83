// demapper: hard-decision demapper, the inverse of the mapper. Takes one
// equalised point (same scale as the mapper: 1.0 = FREQ_ONE) and sends its
// N_BPSC bits one per clock, first bit first. Per axis the first bit is the
// sign; 16-QAM: second bit = |v| < 2K; 64-QAM: second = |v| < 4K,
// third = ||v| - 4K| < 2K, where K is the modulation's scale. The point is
// held until its last bit has gone; 'last' and rate travel with it.
// Hard decisions are this design's choice (the reference architecture gives no detail).
module demapper
  import bb_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,          // synchronous flush (new frame)
  input  logic       in_valid,
  output logic       in_ready,
  input  cplx_t      in_data,
  input  logic       in_last,
  input  rate_info_t in_rate,
  output logic       out_valid,
  input  logic       out_ready,
  output logic       out_bit,
  output logic       out_last,
  output rate_info_t out_rate
);
  logic [5:0] bits;
  logic [2:0] idx;
  logic       full, last_q;
  rate_info_t rq;

  function automatic logic [2:0] axis(input sample_t v, input mod_e m);
    int a;
    logic [2:0] b;
    a = (v < 0) ? -int'(v) : int'(v);
    b = '0;
    b[0] = (v >= 0);
    unique case (m)
      MOD_QAM16: b[1] = (a < 2 * 2591);
      MOD_QAM64: begin
        b[1] = (a < 4 * 1264);
        b[2] = ((a - 4 * 1264 < 2 * 1264) && (a - 4 * 1264 > -2 * 1264));
      end
      default: ;
    endcase
    return b;
  endfunction

  logic [5:0] dec;
  always_comb begin
    logic [2:0] bi, bq;
    bi = axis(in_data.re, in_rate.modu);
    bq = axis(in_data.im, in_rate.modu);
    unique case (in_rate.modu)
      MOD_BPSK:  dec = {5'b0, bi[0]};
      MOD_QPSK:  dec = {4'b0, bq[0], bi[0]};
      MOD_QAM16: dec = {2'b0, bq[1:0], bi[1:0]};
      default:   dec = {bq, bi};
    endcase
  end

  assign in_ready  = !full;
  assign out_valid = full;
  assign out_bit   = bits[idx];
  assign out_rate  = rq;
  assign out_last  = last_q && (idx == 3'(rq.nbpsc - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits <= '0; idx <= '0; full <= 1'b0; last_q <= 1'b0; rq <= rate_info(4'b1101);
    end else if (clear) begin
      full <= 1'b0; idx <= '0;
    end else if (in_valid && in_ready) begin
      bits <= dec; idx <= '0; full <= 1'b1; last_q <= in_last; rq <= in_rate;
    end else if (full && out_ready) begin
      if (idx == 3'(rq.nbpsc - 1)) full <= 1'b0;
      idx <= idx + 1'b1;
    end
  end
endmodule
