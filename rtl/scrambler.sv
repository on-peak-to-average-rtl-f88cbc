// Data scrambler of the transmitter: whitens the data bits so that long
// runs of zeros or ones do not reach the encoders.
//
// A 7-bit linear feedback shift register with polynomial x^7 + x^4 + 1
// produces a period-127 sequence that is XORed onto the data, one bit per
// clock: t = s[7] ^ s[4]; out = in ^ t; the register shifts t in.
// Interface: init loads the 7-bit nonzero seed (start of a packet) and has
// priority; each clock with in_valid consumes one bit, and the scrambled
// bit appears with out_valid on the next clock.
// The scrambler's role is from the thesis; the polynomial is that of the
// 802.11 standard (not printed in the thesis) and the seed port is a choice
// of this design.
module scrambler (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       init,
  input  logic [6:0] seed,
  input  logic       in_valid,
  input  logic       in_bit,
  output logic       out_valid,
  output logic       out_bit
);

  logic [7:1] s;
  logic       t;

  assign t = s[7] ^ s[4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s         <= 7'h7f;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (init) begin
        s <= seed;
      end else if (in_valid) begin
        out_valid <= 1'b1;
        out_bit   <= in_bit ^ t;
        s         <= {s[6:1], t};
      end
    end
  end

endmodule
