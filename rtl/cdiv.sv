// cdiv: complex division unit, q = a / b * 2**13, fully pipelined (one
// division per clock, latency QW+3 clocks). It forms a*conj(b) and |b|^2,
// then divides the magnitudes of the real and imaginary parts by |b|^2 in
// two pipelined restoring dividers and restores the signs; results saturate
// to 16 bits. With b = H (channel) it is the equalizer, Y/H; with b = X (a
// reference point) it gives a fresh channel estimate, Y/X. A 'tag' travels
// with each division. The use of a division unit is from the reference architecture; the
// algorithm and widths are this design's.
module cdiv
  import bb_pkg::*;
#(
  parameter int TW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  cplx_t         a,
  input  cplx_t         b,
  input  logic [TW-1:0] in_tag,
  output logic          out_valid,
  output cplx_t         q,
  output logic [TW-1:0] out_tag
);
  localparam int QW = 16;
  localparam int LAT = QW + 1;
  logic signed [33:0] pr, pi;
  logic        [33:0] den;
  logic        [47:0] nr, ni;
  logic               sr, si, v1;
  logic        [TW-1:0] t1;
  logic [QW-1:0] qr, qi;
  logic          vr, vi;
  logic [LAT-1:0] sr_d, si_d;
  logic [TW-1:0]  tag_d [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pr <= '0; pi <= '0; den <= '0; v1 <= 1'b0; t1 <= '0;
    end else begin
      v1  <= in_valid;
      t1  <= in_tag;
      pr  <= 34'(a.re * b.re) + 34'(a.im * b.im);
      pi  <= 34'(a.im * b.re) - 34'(a.re * b.im);
      den <= 34'(34'(b.re * b.re) + 34'(b.im * b.im));
    end
  end

  assign sr = pr[33];
  assign si = pi[33];
  assign nr = 48'(sr ? -pr : pr) << 13;
  assign ni = 48'(si ? -pi : pi) << 13;

  udiv_pipe #(.NW(48), .DW(34), .QW(QW)) u_dr (
    .clk, .rst_n, .in_valid(v1), .num(nr), .den, .out_valid(vr), .quo(qr));
  udiv_pipe #(.NW(48), .DW(34), .QW(QW)) u_di (
    .clk, .rst_n, .in_valid(v1), .num(ni), .den, .out_valid(vi), .quo(qi));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_d <= '0; si_d <= '0;
      for (int i = 0; i < LAT; i++) tag_d[i] <= '0;
    end else begin
      sr_d <= {sr_d[LAT-2:0], sr};
      si_d <= {si_d[LAT-2:0], si};
      tag_d[0] <= t1;
      for (int i = 1; i < LAT; i++) tag_d[i] <= tag_d[i-1];
    end
  end

  function automatic sample_t apply(input logic [QW-1:0] m, input logic neg);
    logic [QW-1:0] c;
    c = (m > QW'(32767)) ? QW'(32767) : m;
    return neg ? -sample_t'(c) : sample_t'(c);
  endfunction

  assign out_valid = vr;
  assign q.re = apply(qr, sr_d[LAT-1]);
  assign q.im = apply(qi, si_d[LAT-1]);
  assign out_tag = tag_d[LAT-1];
endmodule
