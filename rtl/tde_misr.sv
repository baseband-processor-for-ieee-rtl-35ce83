// tde_misr: BIST test data extractor, a multiple-input signature register:
// an LFSR (CRC-16-CCITT polynomial by default) that XORs a DW-bit input word
// (folded to W bits) into its state whenever 'en' is high. After a test the
// state is a signature of everything it saw. The reference architecture gives the TDE as an
// LFSR; polynomial and width are this design's.
module tde_misr #(
  parameter int           W    = 16,
  parameter int           DW   = 32,
  parameter logic [W-1:0] POLY = 16'h1021
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          en,
  input  logic [DW-1:0] data,
  output logic [W-1:0]  sig
);
  logic [W-1:0] fold;
  always_comb begin
    fold = '0;
    for (int i = 0; i < DW; i++) fold[i % W] = fold[i % W] ^ data[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sig <= '0;
    else if (clear) sig <= '0;
    else if (en)    sig <= ({sig[W-2:0], 1'b0} ^ (sig[W-1] ? POLY : '0)) ^ fold;
  end
endmodule
