// Shared types and constants of the selected-mapping (SLM) PAPR-reduction
// transmitter.
//
// Samples are complex, 16-bit two's complement per component, with 14
// fractional bits (Q2.14, range [-2, 2)). The transform length is 64 as in
// 802.11n at 20 MHz, and M = 4 candidate sequences are compared: the plain
// IFFT output and three candidates produced by conversion matrices.
// The three phase-rotation vectors repeat with period 4 over the
// subcarriers; they are stored as quarter-turn codes
// (0 = 1, 1 = j, 2 = -1, 3 = -j).
// The 16-bit word length and N, M and the three phase vectors follow the
// thesis this design is based on. The Q2.14 split, the side-information
// tone positions and the twiddle format are choices of this design.
package slm_pkg;

  localparam int N      = 64;          // IFFT length
  localparam int LOG2N  = 6;
  localparam int M      = 4;           // number of SLM candidates
  localparam int W      = 16;          // bits per real component
  localparam int FRAC   = 14;          // fractional bits (Q2.14)
  localparam int N_SI   = 5;           // side-information tones / code length
  localparam int GI_LEN = 16;          // guard interval: 0.8 us at 20 MHz

  typedef logic signed [W-1:0] smp_t;
  typedef struct packed {
    smp_t re;
    smp_t im;
  } cplx_t;

  // Quarter-turn code of one phase-vector element: 1, j, -1, -j.
  typedef logic [1:0] qturn_t;
  // One phase vector period (element k uses entry k mod 4).
  typedef qturn_t pvec_t [4];

  // Phase vectors of candidates 1..3 (candidate 0 is the unrotated symbol):
  // [1, j, 1, j], [1, j, 1, -j], [1, j, -1, j].
  localparam pvec_t PVEC1 = '{2'd0, 2'd1, 2'd0, 2'd1};
  localparam pvec_t PVEC2 = '{2'd0, 2'd1, 2'd0, 2'd3};
  localparam pvec_t PVEC3 = '{2'd0, 2'd1, 2'd2, 2'd1};

  // FFT bins carrying the side-information code bits (design choice:
  // subcarriers +3, +15, +27, -25, -13, clear of DC, pilots and guard band).
  typedef int si_tones_t [N_SI];
  localparam si_tones_t SI_TONES = '{3, 15, 27, 39, 51};

  // Modulation of the data subcarriers (bits per subcarrier 1, 2, 4, 6).
  typedef enum logic [1:0] {MOD_BPSK, MOD_QPSK, MOD_16QAM, MOD_64QAM} mod_t;

  function automatic int bits_per_sc(input mod_t m);
    case (m)
      MOD_BPSK:  return 1;
      MOD_QPSK:  return 2;
      MOD_16QAM: return 4;
      default:   return 6;
    endcase
  endfunction

  // Pilot bins (subcarriers -21, -7, +7, +21) and their BPSK values.
  localparam int N_PILOT = 4;
  typedef int pilot_bins_t [N_PILOT];
  localparam pilot_bins_t PILOT_BINS = '{43, 57, 7, 21};
  localparam pilot_bins_t PILOT_SIGN = '{1, 1, 1, -1};
  // Data subcarriers per stream: 56 used - 4 pilots - 5 side-information.
  localparam int N_DATA_SC = 56 - N_PILOT - N_SI;

  // Twiddle ROM value: round(2^14 * cos / sin(2*pi*e/64)), evaluated only
  // at elaboration to fill constant tables.
  localparam real PI = 3.141592653589793;
  function automatic int tw_cos(input int e);
    return int'($floor(16384.0 * $cos(2.0 * PI * real'(e) / real'(N)) + 0.5));
  endfunction
  function automatic int tw_sin(input int e);
    return int'($floor(16384.0 * $sin(2.0 * PI * real'(e) / real'(N)) + 0.5));
  endfunction

  typedef logic signed [16:0] tw_t;    // 17 bits so that +1.0 = 16384 fits
  typedef tw_t tw_tab_t [N];
  function automatic tw_tab_t mk_cos_tab();
    tw_tab_t t;
    for (int i = 0; i < N; i++) t[i] = tw_t'(tw_cos(i));
    return t;
  endfunction
  function automatic tw_tab_t mk_sin_tab();
    tw_tab_t t;
    for (int i = 0; i < N; i++) t[i] = tw_t'(tw_sin(i));
    return t;
  endfunction

  // Bit reversal of a 6-bit index.
  function automatic logic [LOG2N-1:0] bitrev(input logic [LOG2N-1:0] a);
    logic [LOG2N-1:0] r;
    for (int i = 0; i < LOG2N; i++) r[i] = a[LOG2N-1-i];
    return r;
  endfunction

endpackage
