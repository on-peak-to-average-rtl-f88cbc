// Stream parser: divides the coded bits into the N_SS spatial streams.
//
// Coded bits arrive as pairs (bit A first, then bit B), at most one pair
// per clock. They are dealt out in blocks of s = max(1, N_BPSC/2) bits:
// s bits to stream 0, the next s to stream 1, ..., then back to stream 0,
// so that each constellation axis of a stream is fed by consecutive bits.
// A pair can be split between two streams (s = 1 or 3). The outputs are
// registered: for each stream, out_valid[ss] is a 2-bit mask (bit 0 = the
// earlier bit) and out_bits[ss] the bits, one clock after the input.
// init restarts at stream 0. The modulation is taken from mod every clock
// and must only change together with init.
// Dividing the coded bits into per-stream blocks is from the thesis; the
// block size s is the 802.11n rule, and the pair interface is a choice of
// this design.
module stream_parser
  import slm_pkg::*;
#(
  parameter int N_SS = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  mod_t        mod,
  input  logic        in_valid,
  input  logic [1:0]  in_bits,      // [0] = A (first), [1] = B
  output logic [1:0]  out_valid [N_SS],
  output logic [1:0]  out_bits  [N_SS]
);

  localparam int SW = (N_SS > 1) ? $clog2(N_SS) : 1;
  logic [SW-1:0] ss;      // stream that takes the next bit
  logic [1:0]    cnt;     // bits already given to it in this block
  logic [1:0]    s_blk;

  // s = max(1, N_BPSC / 2)
  always_comb begin
    case (mod)
      MOD_16QAM: s_blk = 2'd2;
      MOD_64QAM: s_blk = 2'd3;
      default:   s_blk = 2'd1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ss  <= '0;
      cnt <= '0;
      for (int k = 0; k < N_SS; k++) begin
        out_valid[k] <= '0;
        out_bits[k]  <= '0;
      end
    end else begin
      for (int k = 0; k < N_SS; k++) out_valid[k] <= '0;
      if (init) begin
        ss  <= '0;
        cnt <= '0;
      end else if (in_valid) begin
        logic [SW-1:0] s_n;
        logic [1:0]    c_n;
        s_n = ss;
        c_n = cnt;
        for (int b = 0; b < 2; b++) begin
          out_valid[s_n][b] <= 1'b1;
          out_bits[s_n][b]  <= in_bits[b];
          if (c_n + 2'd1 == s_blk) begin
            c_n = '0;
            s_n = (int'(s_n) == N_SS - 1) ? '0 : s_n + 1'b1;
          end else begin
            c_n = c_n + 2'd1;
          end
        end
        ss  <= s_n;
        cnt <= c_n;
      end
    end
  end

endmodule
