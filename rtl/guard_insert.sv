// guard_insert: prepends the 16-sample cyclic prefix to each 64-sample
// IFFT output, giving the 80-sample OFDM symbol (samples 48..63, then
// 0..63). Two 64-sample banks form a ping-pong buffer so one symbol is
// written while the previous one is read. Valid/ready on both sides; the
// 'last' tag of a symbol is raised on its final output sample.
// The guard length is the standard's; the buffering is this design's.
module guard_insert
  import bb_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  cplx_t in_data,
  input  logic  in_tag,
  output logic  out_valid,
  input  logic  out_ready,
  output cplx_t out_data,
  output logic  out_last
);
  cplx_t      mem [2][64];
  logic [1:0] full, btag;
  logic       wb, rb;
  logic [5:0] wk;
  logic [6:0] rk;              // 0..79
  logic [5:0] raddr;

  assign raddr     = (rk < 7'd16) ? 6'(rk + 7'd48) : 6'(rk - 7'd16);
  assign in_ready  = !full[wb];
  assign out_valid = full[rb];
  assign out_data  = mem[rb][raddr];
  assign out_last  = btag[rb] && (rk == 7'd79);

  always_ff @(posedge clk) if (in_valid && in_ready) mem[wb][wk] <= in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '0; btag <= '0; wb <= 1'b0; rb <= 1'b0; wk <= '0; rk <= '0;
    end else begin
      if (in_valid && in_ready) begin
        if (wk == 0) btag[wb] <= in_tag;
        wk <= wk + 1'b1;
        if (wk == 6'd63) begin full[wb] <= 1'b1; wb <= ~wb; end
      end
      if (out_valid && out_ready) begin
        if (rk == 7'd79) begin rk <= '0; full[rb] <= 1'b0; rb <= ~rb; end
        else rk <= rk + 1'b1;
      end
    end
  end
endmodule
