// Encoder parser: hands the scrambled bits to the N_ES convolutional
// encoders in turn (round robin), bit 0 to encoder 0, bit 1 to encoder 1,
// and so on, so that each encoder runs at 1/N_ES of the data rate.
// Purely a demultiplexer with a turn counter: the bit in this clock goes
// to encoder turn (out_valid[turn] = in_valid, combinational; the other
// encoders see out_bit = 0), and turn
// advances after every valid bit. init returns the turn to encoder 0.
// The round-robin rule is stated in the thesis; the interface is a choice
// of this design.
module encoder_parser #(
  parameter int N_ES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic init,
  input  logic in_valid,
  input  logic in_bit,
  output logic out_valid [N_ES],
  output logic out_bit   [N_ES]
);

  localparam int TW = (N_ES > 1) ? $clog2(N_ES) : 1;
  logic [TW-1:0] turn;

  always_comb
    for (int e = 0; e < N_ES; e++) begin
      out_valid[e] = in_valid && (int'(turn) == e);
      out_bit[e]   = in_valid && (int'(turn) == e) && in_bit;
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            turn <= '0;
    else if (init)         turn <= '0;
    else if (in_valid)     turn <= (int'(turn) == N_ES - 1) ? '0 : turn + 1'b1;
  end

endmodule
