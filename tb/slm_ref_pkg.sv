// Floating-point reference model of SLM PAPR reduction for the testbenches.
// It works in the IFFT-bank form: every candidate is a full inverse DFT
// (with the 1/64 factor) of the subcarriers multiplied by the phase
// vector, so it shares no arithmetic with the conversion-matrix hardware.
// Values are in LSBs of the Q2.14 sample format.
package slm_ref_pkg;
  import slm_pkg::*;

  typedef real sym_t [N];

  // 5-bit side-information codewords, as cw[4:0], by candidate index
  localparam logic [4:0] REF_CW [4] = '{5'b00000, 5'b01111, 5'b10101, 5'b11010};

  function automatic void rot(input int q, input real ar, input real ai,
                              output real br, output real bi);
    case (q % 4)
      0: begin br = ar;  bi = ai;  end
      1: begin br = -ai; bi = ar;  end
      2: begin br = -ar; bi = -ai; end
      default: begin br = ai; bi = -ar; end
    endcase
  endfunction

  // Candidate i (0 = unrotated) of frequency symbol (fr, fi).
  function automatic void candidate(input int i, input sym_t fr, input sym_t fi,
                                    output sym_t tr, output sym_t ti);
    pvec_t pv;
    pv = (i == 1) ? PVEC1 : (i == 2) ? PVEC2 : (i == 3) ? PVEC3 : '{2'd0, 2'd0, 2'd0, 2'd0};
    for (int n = 0; n < N; n++) begin
      real sr, si;
      sr = 0.0; si = 0.0;
      for (int k = 0; k < N; k++) begin
        real br, bi, a;
        rot(int'(pv[k % 4]), fr[k], fi[k], br, bi);
        a = 2.0 * PI * real'(k * n) / real'(N);
        sr += br * $cos(a) - bi * $sin(a);
        si += br * $sin(a) + bi * $cos(a);
      end
      tr[n] = sr / real'(N);
      ti[n] = si / real'(N);
    end
  endfunction

  function automatic real papr(input sym_t tr, input sym_t ti);
    real pk, en, p;
    pk = 0.0; en = 0.0;
    for (int n = 0; n < N; n++) begin
      p = tr[n] * tr[n] + ti[n] * ti[n];
      if (p > pk) pk = p;
      en += p;
    end
    return (en == 0.0) ? 0.0 : pk / (en / real'(N));
  endfunction

  // Add the BPSK side-information tones of codeword cw at level lvl (LSB).
  function automatic void add_si(input logic [4:0] cw, input int lvl,
                                 inout sym_t tr, inout sym_t ti);
    for (int n = 0; n < N; n++)
      for (int t = 0; t < N_SI; t++) begin
        real a, d;
        d = cw[t] ? -1.0 : 1.0;
        a = 2.0 * PI * real'(SI_TONES[t] * n) / real'(N);
        tr[n] += d * $cos(a) * real'(lvl) / real'(N);
        ti[n] += d * $sin(a) * real'(lvl) / real'(N);
      end
  endfunction

  // Used subcarriers of a 20 MHz HT symbol that carry data here: bins
  // +-1..28 without the side-information bins.
  function automatic bit data_bin(input int k);
    if (k == 0 || (k > 28 && k < 36)) return 1'b0;
    for (int t = 0; t < N_SI; t++) if (k == SI_TONES[t]) return 1'b0;
    return 1'b1;
  endfunction

  // 802.11 Gray-mapped constellation point of bits (bits[0] sent first),
  // in LSBs (unit power = 16384).
  function automatic void ref_point(input int m, input logic [5:0] b,
                                    output real re, output real im);
    int li, lq;
    real k;
    case (m)
      0: begin li = b[0] ? 1 : -1; lq = 0; k = 1.0; end
      1: begin li = b[0] ? 1 : -1; lq = b[1] ? 1 : -1; k = 1.0 / $sqrt(2.0); end
      2: begin
        li = (b[0] ? 1 : -1) * (b[1] ? 1 : 3);
        lq = (b[2] ? 1 : -1) * (b[3] ? 1 : 3);
        k = 1.0 / $sqrt(10.0);
      end
      default: begin
        li = (b[0] ? 1 : -1) * (b[1] ? (b[2] ? 3 : 1) : (b[2] ? 5 : 7));
        lq = (b[3] ? 1 : -1) * (b[4] ? (b[5] ? 3 : 1) : (b[5] ? 5 : 7));
        k = 1.0 / $sqrt(42.0);
      end
    endcase
    re = real'(li) * k * 16384.0;
    im = real'(lq) * k * 16384.0;
  endfunction

  function automatic bit si_bin(input int k);
    for (int t = 0; t < N_SI; t++) if (k == SI_TONES[t]) return 1'b1;
    return 1'b0;
  endfunction
endpackage
