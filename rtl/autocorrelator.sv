// autocorrelator: delay-and-correlate detector for the periodic short
// preamble. For every input sample r(n) it updates
//   c(n) = sum_{i=0}^{WIN-1} r(n-i) * conj(r(n-i-LAG))
//   p(n) = sum_{i=0}^{WIN-1} |r(n-i-LAG)|^2
// with running sums (add the newest product, subtract the one WIN samples
// old). During the short preamble |c| ~ p and the angle of c is LAG times
// the per-sample phase step of a carrier offset. Products are formed from
// the top DW bits of each component. Outputs are registered, one clock after
// the sample. LAG = 16 is the short training period; WIN and DW are this
// design's choice.
module autocorrelator
  import bb_pkg::*;
#(
  parameter int LAG = 16,
  parameter int WIN = 16,
  parameter int DW  = 12
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  in_valid,
  input  cplx_t in_data,
  output logic  out_valid,
  output logic signed [2*DW+5:0] c_re,
  output logic signed [2*DW+5:0] c_im,
  output logic        [2*DW+5:0] p
);
  typedef logic signed [DW-1:0] d_t;
  typedef logic signed [2*DW:0] prod_t;
  d_t    dre [LAG+WIN];           // sample delay line, [0] newest
  d_t    dim [LAG+WIN];
  prod_t pre [WIN];               // product delay line
  prod_t pim [WIN];
  prod_t ppw [WIN];

  d_t xr, xi, yr, yi;
  prod_t nre, nim, npw;
  assign xr = d_t'(in_data.re >>> (16 - DW));
  assign xi = d_t'(in_data.im >>> (16 - DW));
  assign yr = dre[LAG-1];         // r(n-LAG)
  assign yi = dim[LAG-1];
  assign nre = prod_t'(xr * yr) + prod_t'(xi * yi);
  assign nim = prod_t'(xi * yr) - prod_t'(xr * yi);
  assign npw = prod_t'(yr * yr) + prod_t'(yi * yi);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAG+WIN; i++) begin dre[i] <= '0; dim[i] <= '0; end
      for (int i = 0; i < WIN; i++) begin pre[i] <= '0; pim[i] <= '0; ppw[i] <= '0; end
      c_re <= '0; c_im <= '0; p <= '0; out_valid <= 1'b0;
    end else if (clear) begin
      for (int i = 0; i < LAG+WIN; i++) begin dre[i] <= '0; dim[i] <= '0; end
      for (int i = 0; i < WIN; i++) begin pre[i] <= '0; pim[i] <= '0; ppw[i] <= '0; end
      c_re <= '0; c_im <= '0; p <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        dre[0] <= xr; dim[0] <= xi;
        for (int i = 1; i < LAG+WIN; i++) begin dre[i] <= dre[i-1]; dim[i] <= dim[i-1]; end
        pre[0] <= nre; pim[0] <= nim; ppw[0] <= npw;
        for (int i = 1; i < WIN; i++) begin pre[i] <= pre[i-1]; pim[i] <= pim[i-1]; ppw[i] <= ppw[i-1]; end
        c_re <= c_re + nre - pre[WIN-1];
        c_im <= c_im + nim - pim[WIN-1];
        p    <= p + (2*DW+6)'(npw) - (2*DW+6)'(ppw[WIN-1]);
      end
    end
  end
endmodule
