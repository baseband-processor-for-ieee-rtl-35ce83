// sync_fifo: single-clock first-in first-out buffer with a valid/ready
// handshake on both sides. Used as the transmitter's input buffer (PSDU
// bytes from the MAC) and wherever the datapath needs elastic storage.
// A word written in cycle t can be read from cycle t+1; 'clear' empties
// the buffer in one cycle. The storage is a
// plain array; depth and width are parameters (the depth of the transmit
// input buffer is not given by the reference architecture and is chosen here).
module sync_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,     // synchronous flush
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [$clog2(DEPTH+1)-1:0] level
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic push, pop;

  assign in_ready  = (level != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (level != '0);
  assign push = in_valid && in_ready;
  assign pop  = out_valid && out_ready;
  assign out_data = mem[rp];

  always_ff @(posedge clk) if (push) mem[wp] <= in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; level <= '0;
    end else if (clear) begin
      wp <= '0; rp <= '0; level <= '0;
    end else begin
      if (push) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      level <= level + (push ? 1'b1 : 1'b0) - (pop ? 1'b1 : 1'b0);
    end
  end

  // no write into a full buffer, no read from an empty one
  assert property (@(posedge clk) disable iff (!rst_n) push |-> level < DEPTH);
endmodule
