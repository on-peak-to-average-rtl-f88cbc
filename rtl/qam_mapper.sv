// QAM mapping: turns the bits of one subcarrier into a constellation point
// of BPSK, QPSK, 16-QAM or 64-QAM, the four modulations of the 802.11n
// rate tables, normalised to unit average power.
//
// bits[0] is the first bit. The first half of the bits (the only bit for
// BPSK) selects the in-phase level, the second half the quadrature level,
// each Gray coded: one bit 0/1 -> -1/+1; two bits 00,01,11,10 ->
// -3,-1,+1,+3; three bits 000,001,011,010,110,111,101,100 ->
// -7,-5,-3,-1,+1,+3,+5,+7. Levels are scaled by 1, 1/sqrt(2), 1/sqrt(10)
// or 1/sqrt(42) and given in Q2.14. Purely combinational.
// The set of modulations comes from the thesis's rate tables; the Gray
// labelling and scaling are those of the 802.11 standard.
module qam_mapper
  import slm_pkg::*;
(
  input  mod_t        mod,
  input  logic [5:0]  bits,
  output cplx_t       point
);

  localparam int K_QPSK = int'($floor(16384.0 / $sqrt(2.0)  + 0.5));
  localparam int K_16   = int'($floor(16384.0 / $sqrt(10.0) + 0.5));
  localparam int K_64   = int'($floor(16384.0 / $sqrt(42.0) + 0.5));

  // Gray-coded level (odd integer) of one axis from n bits, first bit in b[0].
  function automatic int level(input logic [2:0] b, input int n);
    logic [2:0] g;
    int         u;
    case (n)
      1: return b[0] ? 1 : -1;
      2: begin
        g = {1'b0, b[0], b[0] ^ b[1]};       // Gray -> binary, MSB first
        u = int'(g[1:0]);
        return 2 * u - 3;
      end
      default: begin
        g[2] = b[0];
        g[1] = b[0] ^ b[1];
        g[0] = b[0] ^ b[1] ^ b[2];
        u = int'(g);
        return 2 * u - 7;
      end
    endcase
  endfunction

  always_comb begin
    int li, lq, k;
    case (mod)
      MOD_BPSK: begin
        li = level(3'(bits[0]), 1); lq = 0; k = 16384;
      end
      MOD_QPSK: begin
        li = level(3'(bits[0]), 1); lq = level(3'(bits[1]), 1); k = K_QPSK;
      end
      MOD_16QAM: begin
        li = level(3'(bits[1:0]), 2); lq = level(3'(bits[3:2]), 2); k = K_16;
      end
      default: begin
        li = level(bits[2:0], 3); lq = level(bits[5:3], 3); k = K_64;
      end
    endcase
    point.re = smp_t'(li * k);
    point.im = smp_t'(lq * k);
  end

endmodule
