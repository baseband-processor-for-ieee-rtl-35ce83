// udiv_pipe: pipelined unsigned restoring divider, one quotient bit per
// stage, one division per clock, latency QW+1 clocks. The quotient
// saturates to 2**QW-1 when it would not fit (or the divisor is 0).
// Helper of the complex division unit (cdiv).
module udiv_pipe #(
  parameter int NW = 48,   // numerator width
  parameter int DW = 34,   // denominator width
  parameter int QW = 16    // quotient width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic          out_valid,
  output logic [QW-1:0] quo
);
  localparam int RW = DW + 1;
  logic [QW-1:0] n_s [QW+1];        // numerator bits still to bring down
  logic [DW-1:0] d_s [QW+1];
  logic [RW-1:0] r_s [QW+1];        // partial remainder (< den)
  logic [QW-1:0] q_s [QW+1];
  logic [QW:0]   v_s, o_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_s[0] <= 1'b0; n_s[0] <= '0; d_s[0] <= '0; r_s[0] <= '0; q_s[0] <= '0; o_s[0] <= 1'b0;
    end else begin
      v_s[0] <= in_valid;
      n_s[0] <= num[QW-1:0];
      d_s[0] <= den;
      r_s[0] <= RW'(num >> QW);
      q_s[0] <= '0;
      o_s[0] <= (den == 0) || ((num >> QW) >= NW'(den));
    end
  end

  for (genvar i = 0; i < QW; i++) begin : g_st
    logic [RW:0] r2;
    logic        ge;
    assign r2 = {r_s[i], n_s[i][QW-1]};
    assign ge = r2 >= (RW+1)'(d_s[i]);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v_s[i+1] <= 1'b0; n_s[i+1] <= '0; d_s[i+1] <= '0; r_s[i+1] <= '0; q_s[i+1] <= '0; o_s[i+1] <= 1'b0;
      end else begin
        v_s[i+1] <= v_s[i];
        n_s[i+1] <= n_s[i] << 1;
        d_s[i+1] <= d_s[i];
        r_s[i+1] <= RW'(ge ? r2 - (RW+1)'(d_s[i]) : r2);
        q_s[i+1] <= {q_s[i][QW-2:0], ge};
        o_s[i+1] <= o_s[i];
      end
    end
  end

  assign out_valid = v_s[QW];
  assign quo = o_s[QW] ? '1 : q_s[QW];
endmodule
