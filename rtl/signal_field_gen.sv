// signal_field_gen: builds the 24-bit 802.11a SIGNAL field and sends it one
// bit per clock (valid/ready), first bit first:
//   bits 0-3 RATE (R1..R4), bit 4 reserved (0), bits 5-16 LENGTH (LSB first),
//   bit 17 even parity over bits 0-16, bits 18-23 tail (0).
// 'start' latches RATE and LENGTH; 'busy' is high until the 24th bit has been
// accepted. The field layout is the standard's; the serial interface is this
// design's choice.
module signal_field_gen (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [3:0]  rate,      // R1 in bit 3
  input  logic [11:0] length,    // PSDU length in bytes
  output logic        busy,
  output logic        out_valid,
  input  logic        out_ready,
  output logic        out_bit,
  output logic        out_last
);
  logic [23:0] field;
  logic [4:0]  idx;

  function automatic logic [23:0] build(input logic [3:0] r, input logic [11:0] len);
    logic [23:0] f;
    f = '0;
    f[0] = r[3]; f[1] = r[2]; f[2] = r[1]; f[3] = r[0];
    f[16:5] = len;
    f[17] = ^f[16:0];
    return f;
  endfunction

  assign out_valid = busy;
  assign out_bit   = field[idx];
  assign out_last  = (idx == 5'd23);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; idx <= '0; field <= '0;
    end else if (start && !busy) begin
      field <= build(rate, length);
      idx <= '0; busy <= 1'b1;
    end else if (busy && out_ready) begin
      if (idx == 5'd23) busy <= 1'b0;
      idx <= idx + 1'b1;
    end
  end
endmodule
