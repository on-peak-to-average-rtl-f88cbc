// Conversion matrix T = Q R Q^-1 of one SLM candidate, applied to one time
// sample per clock without any multiplier.
//
// Multiplying the subcarriers by a phase vector b that repeats every four
// subcarriers is, in the time domain, a circular convolution of the IFFT
// output x with a sequence that is zero except at lags 0, 16, 32 and 48.
// Hence each candidate sample is
//   s[n] = sum_{l=0..3} g_l * x[(n - 16 l) mod 64],
//   g_l  = (1/4) * sum_{p=0..3} b_p * j^(p*l).
// With b_p in {1, j, -1, -j} every g_l is a multiple of 1/4 with integer
// real and imaginary parts; for the three vectors used here each g_l is 0,
// +-1/2 or +-j/2, so the sum is a handful of additions, a swap of real and
// imaginary parts and a one-bit shift. The coefficients are computed from
// the PVEC parameter at elaboration.
//
// Interface: x_lag[l] must carry x[(n - 16 l) mod 64]; s is combinational
// (no clock), truncated (floor) to the sample format.
// The conversion-matrix idea, the period-4 phase vectors and their values
// follow the thesis; the sample format and truncation are choices of this
// design.
module conv_matrix
  import slm_pkg::*;
#(
  parameter pvec_t PVEC = PVEC1
) (
  input  cplx_t x_lag [4],
  output cplx_t s
);

  typedef int coef_t [4];

  // 4*g_l: real and imaginary parts (integers in -4..4).
  function automatic coef_t mk_g(input bit imag);
    coef_t g;
    for (int l = 0; l < 4; l++) begin
      g[l] = 0;
      for (int p = 0; p < 4; p++) begin
        case ((int'(PVEC[p]) + p * l) % 4)
          0: if (!imag) g[l] += 1;
          1: if (imag)  g[l] += 1;
          2: if (!imag) g[l] -= 1;
          default: if (imag) g[l] -= 1;
        endcase
      end
    end
    return g;
  endfunction

  localparam coef_t GR = mk_g(1'b0);
  localparam coef_t GI = mk_g(1'b1);

  logic signed [W+4:0] acc_re, acc_im;

  always_comb begin
    acc_re = '0;
    acc_im = '0;
    for (int l = 0; l < 4; l++) begin
      acc_re += (W+5)'(GR[l]) * (W+5)'(x_lag[l].re) - (W+5)'(GI[l]) * (W+5)'(x_lag[l].im);
      acc_im += (W+5)'(GR[l]) * (W+5)'(x_lag[l].im) + (W+5)'(GI[l]) * (W+5)'(x_lag[l].re);
    end
    s.re = W'(acc_re >>> 2);
    s.im = W'(acc_im >>> 2);
  end

endmodule
