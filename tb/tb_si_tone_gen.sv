// Self-checking testbench of si_tone_gen: for all 32 five-bit words and
// several levels a, compares every time sample with the floating-point
// inverse DFT of the BPSK tones on the reserved bins.
module tb_si_tone_gen;
  import slm_pkg::*;
  logic [4:0] cw;
  smp_t level;
  logic [LOG2N-1:0] n;
  cplx_t si;
  int checks = 0, failures = 0;
  localparam int LEVELS [4] = '{16384, 11469, 6554, 0};   // a = 1, 0.7, 0.4, 0

  si_tone_gen dut (.cw, .level, .n, .si);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 32; w++)
      for (int lv = 0; lv < 4; lv++)
        for (int k = 0; k < N; k++) begin
          real er, ei, a;
          cw = 5'(w); level = smp_t'(LEVELS[lv]); n = LOG2N'(k);
          #1;
          er = 0.0; ei = 0.0;
          for (int t = 0; t < N_SI; t++) begin
            real d;
            d = cw[t] ? -1.0 : 1.0;
            a = 2.0 * PI * real'(SI_TONES[t] * k) / real'(N);
            er += d * $cos(a);
            ei += d * $sin(a);
          end
          er = er * real'(LEVELS[lv]) / 64.0;
          ei = ei * real'(LEVELS[lv]) / 64.0;
          checks += 2;
          if (real'(si.re) - er > 1.5 || er - real'(si.re) > 1.5 ||
              real'(si.im) - ei > 1.5 || ei - real'(si.im) > 1.5) begin
            failures++;
            $display("cw %b lvl %0d n %0d: got (%0d,%0d) exp (%f,%f)", cw, LEVELS[lv], k, si.re, si.im, er, ei);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
