// viterbi_decoder: 64-state hard-decision Viterbi decoder for the 802.11a
// K=7 code (g0 = 133, g1 = 171 octal) with depuncturing.
// Input: deinterleaved coded bits, one per clock, with the block's rate and
// a 'last' flag on the final bit of a block (SIGNAL or DATA). A depuncturer
// rebuilds (A,B) pairs, marking stolen bits as erasures (3/4: A0 B0 A1 - -
// B2, 2/3: A0 B0 A1 -). Each pair drives one add-compare-select step over
// all 64 states (Hamming branch metrics, erasures cost nothing, metrics
// renormalised by the minimum). Survivors are kept by register exchange,
// TB bits per state; once the registers are full, every step releases the
// oldest bit of the best state (decision delay TB-1). After a block's last pair the decoder drains the
// survivor of state 0 (the code is terminated by six zero tail bits), one
// bit per clock, without taking input, then restarts from state 0.
// Output bits have no backpressure ('out_valid' pulses); 'out_last' marks a
// block's final bit. The code is the standard's; the register-exchange
// architecture and TB are this design's choices.
module viterbi_decoder
  import bb_pkg::*;
#(
  parameter int TB = 42,
  parameter int MW = 10
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       init,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic       in_bit,
  input  logic       in_last,
  input  rate_info_t in_rate,
  output logic       out_valid,
  output logic       out_bit,
  output logic       out_last
);
  // ---- depuncturing ----
  logic [1:0] dp_ph;       // pair position in the puncturing period
  logic       dp_half;     // A of the current pair already taken
  logic       dp_a;
  logic       p_valid, p_a, p_b, p_ea, p_eb, p_last;
  logic       flushing;
  logic       need_a, need_b;

  always_comb begin
    need_a = 1'b1; need_b = 1'b1;
    unique case (in_rate.cr)
      CR_3_4: begin need_b = (dp_ph != 2'd1); need_a = (dp_ph != 2'd2); end
      CR_2_3: need_b = (dp_ph != 2'd1);
      default: ;
    endcase
    // a pair is complete with this bit?
    p_valid = 1'b0; p_a = 1'b0; p_b = 1'b0; p_ea = !need_a; p_eb = !need_b;
    p_last = in_last;
    if (in_valid && in_ready) begin
      if (need_a && need_b) begin
        if (dp_half) begin p_valid = 1'b1; p_a = dp_a; p_b = in_bit; end
      end else if (need_a) begin
        p_valid = 1'b1; p_a = in_bit;
      end else begin
        p_valid = 1'b1; p_b = in_bit;
      end
    end
  end

  assign in_ready = !flushing;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp_ph <= '0; dp_half <= 1'b0; dp_a <= 1'b0;
    end else if (init) begin
      dp_ph <= '0; dp_half <= 1'b0;
    end else if (in_valid && in_ready) begin
      if (need_a && need_b && !dp_half) begin
        dp_half <= 1'b1; dp_a <= in_bit;
      end else begin
        dp_half <= 1'b0;
        if (in_last) dp_ph <= '0;
        else unique case (in_rate.cr)
          CR_3_4:  dp_ph <= (dp_ph == 2'd2) ? 2'd0 : dp_ph + 1'b1;
          CR_2_3:  dp_ph <= (dp_ph == 2'd1) ? 2'd0 : dp_ph + 1'b1;
          default: dp_ph <= 2'd0;
        endcase
      end
    end
  end

  // ---- add-compare-select with register exchange ----
  typedef logic [MW-1:0] met_t;
  met_t          pm [64];
  logic [TB-1:0] sv [64];
  met_t          npm [64];
  logic [TB-1:0] nsv [64];
  met_t          mn;
  logic [5:0]    best;
  localparam int STEPS_W = $clog2(TB+1);
  logic [STEPS_W-1:0] steps;     // decoded bits held, saturates at TB-1
  logic [STEPS_W-1:0] fl_idx;

  function automatic logic [1:0] code_out(input logic [5:0] s, input logic u);
    return {u ^ s[0] ^ s[1] ^ s[2] ^ s[5], u ^ s[1] ^ s[2] ^ s[4] ^ s[5]};  // {B, A}
  endfunction

  function automatic met_t bm(input logic [1:0] ba);
    met_t m;
    m = '0;
    if (!p_ea && ba[0] != p_a) m = m + 1'b1;
    if (!p_eb && ba[1] != p_b) m = m + 1'b1;
    return m;
  endfunction

  always_comb begin
    for (int s = 0; s < 64; s++) begin
      logic [5:0] p0, p1;
      logic       u;
      met_t       m0, m1;
      u  = s[0];
      p0 = {1'b0, 5'(s >> 1)};
      p1 = {1'b1, 5'(s >> 1)};
      m0 = pm[p0] + bm(code_out(p0, u));
      m1 = pm[p1] + bm(code_out(p1, u));
      if (m1 < m0) begin npm[s] = m1; nsv[s] = {sv[p1][TB-2:0], u}; end
      else         begin npm[s] = m0; nsv[s] = {sv[p0][TB-2:0], u}; end
    end
    mn = npm[0]; best = '0;
    for (int s = 1; s < 64; s++)
      if (npm[s] < mn) begin mn = npm[s]; best = 6'(s); end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 64; s++) begin pm[s] <= (s == 0) ? '0 : met_t'(64); sv[s] <= '0; end
      steps <= '0; flushing <= 1'b0; fl_idx <= '0;
      out_valid <= 1'b0; out_bit <= 1'b0; out_last <= 1'b0;
    end else begin
      out_valid <= 1'b0; out_last <= 1'b0;
      if (init) begin
        for (int s = 0; s < 64; s++) begin pm[s] <= (s == 0) ? '0 : met_t'(64); sv[s] <= '0; end
        steps <= '0; flushing <= 1'b0;
      end else if (flushing) begin
        out_valid <= 1'b1;
        out_bit   <= sv[0][fl_idx - 1'b1];
        out_last  <= (fl_idx == 1);
        fl_idx    <= fl_idx - 1'b1;
        if (fl_idx == 1) begin
          flushing <= 1'b0; steps <= '0;
          for (int s = 0; s < 64; s++) begin pm[s] <= (s == 0) ? '0 : met_t'(64); sv[s] <= '0; end
        end
      end else if (p_valid) begin
        for (int s = 0; s < 64; s++) begin pm[s] <= npm[s] - mn; sv[s] <= nsv[s]; end
        if (steps == STEPS_W'(TB - 1)) begin
          out_valid <= 1'b1;
          out_bit   <= nsv[best][TB-1];
        end else begin
          steps <= steps + 1'b1;
        end
        if (p_last) begin
          flushing <= 1'b1;
          fl_idx <= (steps == STEPS_W'(TB - 1)) ? steps : steps + 1'b1;
        end
      end
    end
  end
endmodule
