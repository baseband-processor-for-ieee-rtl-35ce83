// cordic: pipelined CORDIC, one iteration per stage, one sample per clock.
// VECTOR=0 (rotation, used as the NCO): rotates (x, y) by angle z.
// VECTOR=1 (vectoring): rotates (x, y) onto the positive x axis and returns
// its angle in z and its magnitude in x.
// Angles are unsigned fractions of a full turn, 2**16 = 360 degrees. A
// quarter-turn pre-rotation extends the range to the full circle; the CORDIC
// gain (1.6468) is removed at the output with a Q15 multiply by 0.60725.
// Latency: ITER+2 clocks. Iteration count and widths are this design's
// choice; the reference architecture only names a CORDIC in rotation mode.
module cordic #(
  parameter bit VECTOR = 1'b0,
  parameter int ITER   = 14,
  parameter int XW     = 18         // internal x/y width (input is 16 bits)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic signed [15:0] in_x,
  input  logic signed [15:0] in_y,
  input  logic [15:0]        in_z,
  output logic               out_valid,
  output logic signed [15:0] out_x,
  output logic signed [15:0] out_y,
  output logic [15:0]        out_z
);
  typedef logic [15:0] atan_tab_t [16];
  function automatic atan_tab_t mk_atan();
    atan_tab_t t;
    for (int i = 0; i < 16; i++)
      t[i] = 16'($rtoi($atan(1.0 / (2.0 ** i)) / (2.0 * 3.14159265358979) * 65536.0 + 0.5));
    return t;
  endfunction
  localparam atan_tab_t ATAN = mk_atan();
  localparam logic signed [16:0] INV_GAIN = 17'sd19898;   // 0.60725 * 2**15

  typedef logic signed [XW-1:0] xw_t;
  xw_t        xs [ITER+1];
  xw_t        ys [ITER+1];
  logic [15:0] zs [ITER+1];
  logic [ITER:0] vs;

  // stage 0: quarter-turn pre-rotation
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xs[0] <= '0; ys[0] <= '0; zs[0] <= '0; vs[0] <= 1'b0;
    end else begin
      vs[0] <= in_valid;
      if (!VECTOR) begin
        // bring z into [-90, 90) degrees by a rotation of +-180
        if (in_z[15] != in_z[14]) begin
          xs[0] <= -xw_t'(in_x); ys[0] <= -xw_t'(in_y); zs[0] <= in_z + 16'h8000;
        end else begin
          xs[0] <= xw_t'(in_x); ys[0] <= xw_t'(in_y); zs[0] <= in_z;
        end
      end else begin
        if (in_x < 0) begin
          xs[0] <= -xw_t'(in_x); ys[0] <= -xw_t'(in_y); zs[0] <= 16'h8000;
        end else begin
          xs[0] <= xw_t'(in_x); ys[0] <= xw_t'(in_y); zs[0] <= 16'h0000;
        end
      end
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_it
    logic d;   // 1: rotate counter-clockwise
    assign d = VECTOR ? ys[i][XW-1] : !zs[i][15];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        xs[i+1] <= '0; ys[i+1] <= '0; zs[i+1] <= '0; vs[i+1] <= 1'b0;
      end else begin
        vs[i+1] <= vs[i];
        if (d) begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - ATAN[i];
        end else begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + ATAN[i];
        end
      end
    end
  end

  function automatic logic signed [15:0] scale(input xw_t v);
    logic signed [XW+17:0] p;
    p = (v * INV_GAIN + (1 <<< 14)) >>> 15;
    if (p > 32767)  return 16'sd32767;
    if (p < -32768) return -16'sd32768;
    return 16'(p);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_x <= '0; out_y <= '0; out_z <= '0;
    end else begin
      out_valid <= vs[ITER];
      out_x <= scale(xs[ITER]);
      out_y <= scale(ys[ITER]);
      out_z <= zs[ITER];
    end
  end
endmodule
