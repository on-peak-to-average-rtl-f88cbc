// Rate-1/2 binary convolutional encoder of the 802.11n FEC path: six delay
// registers (constraint length 7), one data bit in and two coded bits out
// per clock.
//
// The coded bits are a = in ^ d2 ^ d3 ^ d5 ^ d6 and b = in ^ d1 ^ d2 ^ d3
// ^ d6, where d1..d6 are the six previous input bits (generators 133 and
// 171 octal). With one bit per clock at 20 MHz this gives 20 Mbit/s of data
// and 40 Mbit/s of coded output.
// Interface: in_valid/in_bit are consumed every clock they are valid; the
// coded pair appears on out_a/out_b with out_valid one clock later. init
// clears the delay line (start of a packet); it has priority over in_valid.
// The six-register structure and one-bit-per-clock operation follow the
// thesis's FPGA estimate; the generator polynomials are those of the
// 802.11 standard, which the thesis refers to but does not print.
// Puncturing to higher code rates is not included.
module conv_encoder (
  input  logic clk,
  input  logic rst_n,
  input  logic init,
  input  logic in_valid,
  input  logic in_bit,
  output logic out_valid,
  output logic out_a,
  output logic out_b
);

  logic [6:1] d;   // d[1] is the most recent previous bit

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d         <= '0;
      out_valid <= 1'b0;
      out_a     <= 1'b0;
      out_b     <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (init) begin
        d <= '0;
      end else if (in_valid) begin
        out_valid <= 1'b1;
        out_a     <= in_bit ^ d[2] ^ d[3] ^ d[5] ^ d[6];
        out_b     <= in_bit ^ d[1] ^ d[2] ^ d[3] ^ d[6];
        d         <= {d[5:1], in_bit};
      end
    end
  end

endmodule
