// conv_encoder: 802.11a convolutional encoder, constraint length 7,
// generators g0 = 133 (octal, output A) and g1 = 171 (output B), rate 1/2,
// punctured to 2/3 or 3/4. One input bit is taken when the output register
// can take its two coded bits; kept coded bits leave one per clock, A before
// B, so the output runs at one coded bit per clock.
// Each input bit carries sideband: 'in_first' (reset the shift register and
// the puncturing phase: start of SIGNAL or of DATA), 'in_last' and the rate
// information, which are passed on with the last coded bit of that input bit.
// Puncturing patterns: 3/4 sends A0 B0 A1 B2, 2/3 sends A0 B0 A1 (standard).
module conv_encoder
  import bb_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,          // synchronous flush (new frame)
  input  logic       in_valid,
  output logic       in_ready,
  input  logic       in_bit,
  input  logic       in_first,
  input  logic       in_last,
  input  rate_info_t in_rate,
  output logic       out_valid,
  input  logic       out_ready,
  output logic       out_bit,
  output logic       out_last,    // last coded bit of a block
  output rate_info_t out_rate
);
  logic [5:0] sr;                 // previous six input bits, sr[0] newest
  logic [1:0] phase;              // position in the puncturing period
  logic [1:0] pend_n;             // coded bits waiting (0..2)
  logic [1:0] pend;               // pend[0] leaves first
  logic       pend_last;
  rate_info_t pend_rate;
  logic       a, b, keep_a, keep_b;
  logic [5:0] s;
  logic [1:0] ph;
  logic       take;

  always_comb begin
    s  = in_first ? 6'd0 : sr;
    ph = in_first ? 2'd0 : phase;
    a  = in_bit ^ s[1] ^ s[2] ^ s[4] ^ s[5];   // 1 011 011
    b  = in_bit ^ s[0] ^ s[1] ^ s[2] ^ s[5];   // 1 111 001
    keep_a = 1'b1; keep_b = 1'b1;
    unique case (in_rate.cr)
      CR_3_4: begin keep_b = (ph != 2'd1); keep_a = (ph != 2'd2); end
      CR_2_3: keep_b = (ph != 2'd1);
      default: ;
    endcase
  end

  assign in_ready  = (pend_n == 2'd0) || (pend_n == 2'd1 && out_ready);
  assign take      = in_valid && in_ready;
  assign out_valid = (pend_n != 2'd0);
  assign out_bit   = pend[0];
  assign out_last  = pend_last && (pend_n == 2'd1);
  assign out_rate  = pend_rate;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0; phase <= '0; pend_n <= '0; pend <= '0; pend_last <= 1'b0;
      pend_rate <= rate_info(4'b1101);
    end else if (clear) begin
      pend_n <= '0;
    end else begin
      if (take) begin
        sr <= {s[4:0], in_bit};
        unique case (in_rate.cr)
          CR_3_4:  phase <= (ph == 2'd2) ? 2'd0 : ph + 1'b1;
          CR_2_3:  phase <= (ph == 2'd1) ? 2'd0 : ph + 1'b1;
          default: phase <= 2'd0;
        endcase
        pend_last <= in_last;
        pend_rate <= in_rate;
        if (keep_a && keep_b)  begin pend <= {b, a};    pend_n <= 2'd2; end
        else if (keep_a)       begin pend <= {1'b0, a}; pend_n <= 2'd1; end
        else                   begin pend <= {1'b0, b}; pend_n <= 2'd1; end
      end else if (out_valid && out_ready) begin
        pend   <= {1'b0, pend[1]};
        pend_n <= pend_n - 1'b1;
      end
    end
  end
endmodule
