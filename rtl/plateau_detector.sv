// plateau_detector: frame detection. A sample is "on the plateau" when the
// autocorrelation magnitude reaches a fraction of the power,
// |c| >= (THR_NUM/8) * p, and the power is above PMIN. |c| is approximated by
// max(|re|,|im|) + min(|re|,|im|)/2. When PLAT_LEN consecutive samples are on
// the plateau, 'detect' pulses and the correlation of that sample is held in
// c_re_q/c_im_q for the frequency-offset estimate. Threshold, minimum power
// and plateau length are this design's choices.
module plateau_detector #(
  parameter int CW       = 30,
  parameter int THR_NUM  = 6,
  parameter int PLAT_LEN = 32,
  parameter int PMIN     = 4096
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 in_valid,
  input  logic signed [CW-1:0] c_re,
  input  logic signed [CW-1:0] c_im,
  input  logic        [CW-1:0] p,
  output logic                 detect,
  output logic signed [CW-1:0] c_re_q,
  output logic signed [CW-1:0] c_im_q,
  output logic                 on_plateau
);
  logic [CW-1:0] ar, ai, mx, mn;
  logic [CW+3:0] mag8, thr;
  logic [$clog2(PLAT_LEN+1)-1:0] cnt;

  always_comb begin
    ar = c_re[CW-1] ? CW'(-c_re) : CW'(c_re);
    ai = c_im[CW-1] ? CW'(-c_im) : CW'(c_im);
    mx = (ar > ai) ? ar : ai;
    mn = (ar > ai) ? ai : ar;
    mag8 = (CW+4)'(mx) * 8 + (CW+4)'(mn) * 4;
    thr  = (CW+4)'(p) * (CW+4)'(THR_NUM);
    on_plateau = (mag8 >= thr) && (p >= CW'(PMIN));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; detect <= 1'b0; c_re_q <= '0; c_im_q <= '0;
    end else if (clear) begin
      cnt <= '0; detect <= 1'b0;
    end else begin
      detect <= 1'b0;
      if (in_valid) begin
        if (!on_plateau) cnt <= '0;
        else if (cnt == ($clog2(PLAT_LEN+1))'(PLAT_LEN - 1)) begin
          detect <= 1'b1; c_re_q <= c_re; c_im_q <= c_im; cnt <= '0;
        end else cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
