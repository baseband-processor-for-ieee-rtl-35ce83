// xcorr_xnor: simplified cross-correlator for symbol timing. Only the sign
// bits of I and Q are kept; the last 64 of them are correlated with the
// sign bits of the known long training symbol, every +-1 product being an
// XNOR and every sum a count of ones:
//   re = sum sI*LI + sQ*LQ,  im = sum sQ*LI - sI*LQ   (each -128..128)
// score = |re| + |im|, so a constant phase left after frequency correction
// does not matter. The score peaks (about 128) when the last 64 samples are
// exactly one long training symbol and stays near 30 elsewhere. Output registered, one clock after the
// sample. The XNOR principle is from the reference architecture; the 64-sample window and
// the reference (the long symbol's signs) are this design's reading of it.
module xcorr_xnor
  import bb_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       in_valid,
  input  cplx_t      in_data,
  output logic       out_valid,
  output logic [8:0] score
);
  function automatic logic [63:0] mk_ref(input bit imag);
    logic [63:0] r;
    cplx_t s;
    for (int n = 0; n < 64; n++) begin
      s = lts_sample(n);
      r[63-n] = imag ? s.im[15] : s.re[15];   // oldest sample at bit 63
    end
    return r;
  endfunction
  localparam logic [63:0] REF_I = mk_ref(1'b0);
  localparam logic [63:0] REF_Q = mk_ref(1'b1);

  logic [63:0] si, sq, ni, nq;

  // |2*count - 128| for a count of agreeing sign pairs out of 128
  function automatic logic [8:0] abs9(input logic [8:0] cnt);
    return (cnt >= 9'd64) ? 9'((cnt - 9'd64) * 2) : 9'((9'd64 - cnt) * 2);
  endfunction
  assign ni = {si[62:0], in_data.re[15]};
  assign nq = {sq[62:0], in_data.im[15]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      si <= '0; sq <= '0; score <= '0; out_valid <= 1'b0;
    end else if (clear) begin
      si <= '0; sq <= '0; score <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        si <= ni; sq <= nq;
        score <= abs9(9'($countones(~(ni ^ REF_I)) + $countones(~(nq ^ REF_Q))))
               + abs9(9'($countones(~(nq ^ REF_I)) + $countones(ni ^ REF_Q)));
      end
    end
  end
endmodule
