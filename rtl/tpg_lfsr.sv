// tpg_lfsr: BIST test pattern generator, a maximal-length Galois LFSR
// (x^16 + x^14 + x^13 + x^11 + 1 by default). 'load' sets the seed, each
// 'step' advances it one position; the whole state is the pattern. The
// reference architecture specifies an LFSR; polynomial, width and seed are this design's.
module tpg_lfsr #(
  parameter int           W    = 16,
  parameter logic [W-1:0] POLY = 16'hB400,  // taps 16,14,13,11 (Galois form)
  parameter logic [W-1:0] SEED = 16'hACE1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         step,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= SEED;
    else if (load)  q <= SEED;
    else if (step)  q <= q[0] ? (q >> 1) ^ POLY : (q >> 1);
  end
endmodule
