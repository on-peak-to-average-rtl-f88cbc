// Time-domain waveform of the side-information tones.
//
// The five code bits cw[t] are sent as BPSK (bit 0 -> +a, bit 1 -> -a) on
// the reserved bins SI_TONES[t]; those bins are kept empty in the data
// symbol, so their contribution can be added after the SLM selection:
//   si[n] = (a / 64) * sum_t (1 - 2 cw[t]) * exp(+j*2*pi*SI_TONES[t]*n/64).
// The exponentials come from a 64-entry cosine/sine table addressed by
// (SI_TONES[t] * n) mod 64, so only five signed additions per component and
// one scaling by the level a are needed. a (Q2.14) is the power-level knob
// that trades PAPR against the robustness of the side information.
//
// Interface: purely combinational; n is the time index 0..63, level is a
// in Q2.14 (0 turns the side information off), si is Q2.14, truncated.
// Sending the side information as BPSK on reserved tones at an adjustable
// level follows the thesis; the tone positions and inserting the tones in
// the time domain after selection are choices of this design.
module si_tone_gen
  import slm_pkg::*;
(
  input  logic [4:0]       cw,
  input  smp_t             level,
  input  logic [LOG2N-1:0] n,
  output cplx_t            si
);

  localparam tw_tab_t COS_T = mk_cos_tab();
  localparam tw_tab_t SIN_T = mk_sin_tab();

  logic signed [W+3:0]     sum_re, sum_im;
  logic signed [2*W+4:0]   pr, pi_;

  always_comb begin
    logic [LOG2N-1:0] a;
    sum_re = '0;
    sum_im = '0;
    for (int t = 0; t < N_SI; t++) begin
      a = LOG2N'(SI_TONES[t] * int'(n));
      if (cw[t]) begin
        sum_re -= (W+4)'(COS_T[a]);
        sum_im -= (W+4)'(SIN_T[a]);
      end else begin
        sum_re += (W+4)'(COS_T[a]);
        sum_im += (W+4)'(SIN_T[a]);
      end
    end
    pr  = (2*W+5)'(sum_re) * (2*W+5)'(level);
    pi_ = (2*W+5)'(sum_im) * (2*W+5)'(level);
    si.re = W'(pr  >>> (FRAC + LOG2N));
    si.im = W'(pi_ >>> (FRAC + LOG2N));
  end

endmodule
