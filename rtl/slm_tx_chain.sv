// One transmit antenna's low-complexity SLM (selected mapping) PAPR
// reducer.
//
// Instead of one IFFT per candidate, the frequency-domain symbol X goes
// through a single 64-point IFFT; the other three candidates
// IFFT(b_i .* X) are formed in the time domain by conversion matrices
// (additions only, see conv_matrix). The candidate with the lowest
// peak-to-average power ratio is then sent, and its 2-bit index, coded
// with the (5,2) shortened Hamming code, rides on five reserved BPSK tones
// at the power level si_level.
//
// Operation, one symbol at a time:
//   LOAD  64 clocks  accept X[0..63] (bin order) on in_valid/in_ready; the
//                    five side-information bins are written as zero.
//   FFT    7 clocks  start pulse, 6 radix-2 stages, done.
//   SCAN  64 clocks  for n = 0..63 all four candidate samples are formed
//                    and papr_select accumulates peak and energy.
//   PICK   1 clock   the winning index and si_level are registered, so
//                    the level is constant over the output symbol.
//   OUT   64 clocks  out_valid with the chosen candidate plus the
//                    side-information waveform, n = 0..63; out_first marks
//                    n = 0, out_sel / out_cw hold index and codeword.
// A new symbol is accepted right after OUT. The output has no back-pressure:
// the consumer must take one sample per clock while out_valid is high.
// The sum with the side-information tones saturates to the Q2.14 range.
//
// The single-IFFT-plus-conversion-matrix structure, M = 4, the three phase
// vectors and the coded BPSK side information at an adjustable level come
// from the thesis. The sequential schedule, the handshake, adding the tones
// after selection and saturation are choices of this design.
module slm_tx_chain
  import slm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // frequency-domain symbol in
  input  logic        in_valid,
  output logic        in_ready,
  input  cplx_t       in_data,
  // side-information power level a (Q2.14), 0 = tones off
  input  smp_t        si_level,
  // time-domain symbol out
  output logic        out_valid,
  output logic        out_first,
  output cplx_t       out_data,
  output logic [1:0]  out_sel,
  output logic [4:0]  out_cw
);

  typedef enum logic [2:0] {S_LOAD, S_FFT, S_WAIT, S_SCAN, S_PICK, S_OUT} state_t;
  state_t            state;
  logic [LOG2N-1:0]  cnt;

  // IFFT
  logic              fft_wr, fft_start, fft_busy, fft_done;
  cplx_t             fft_wdata;
  cplx_t             x [N];

  function automatic logic is_si_bin(input logic [LOG2N-1:0] k);
    logic r;
    r = 1'b0;
    for (int t = 0; t < N_SI; t++) if (int'(k) == SI_TONES[t]) r = 1'b1;
    return r;
  endfunction

  assign in_ready  = (state == S_LOAD);
  assign fft_wr    = in_valid && in_ready;
  assign fft_wdata = is_si_bin(cnt) ? cplx_t'('0) : in_data;
  assign fft_start = (state == S_FFT);

  ifft64 u_ifft (
    .clk, .rst_n,
    .wr_en(fft_wr), .wr_addr(cnt), .wr_data(fft_wdata),
    .start(fft_start), .busy(fft_busy), .done(fft_done),
    .x_out(x)
  );

  // Candidate samples at time index cnt.
  cplx_t x_lag [4];
  cplx_t cand  [M];
  always_comb
    for (int l = 0; l < 4; l++) x_lag[l] = x[cnt - LOG2N'(16 * l)];

  assign cand[0] = x_lag[0];
  conv_matrix #(.PVEC(PVEC1)) u_t1 (.x_lag, .s(cand[1]));
  conv_matrix #(.PVEC(PVEC2)) u_t2 (.x_lag, .s(cand[2]));
  conv_matrix #(.PVEC(PVEC3)) u_t3 (.x_lag, .s(cand[3]));

  logic [1:0]        best, sel;
  logic [2*W-1:0]    peak   [M];
  logic [2*W+LOG2N-1:0] energy [M];

  papr_select #(.NC(M)) u_sel (
    .clk, .rst_n,
    .clr(state == S_SCAN && cnt == '0),
    .en(state == S_SCAN),
    .cand, .best, .peak, .energy
  );

  logic [4:0]        cw;
  cplx_t             si;
  smp_t              level;
  si_encoder  u_enc (.idx(sel), .cw);
  si_tone_gen u_si  (.cw, .level, .n(cnt), .si);

  function automatic smp_t sat_add(input smp_t a, input smp_t b);
    logic signed [W:0] s;
    s = {a[W-1], a} + {b[W-1], b};
    if (s > (W+1)'(2**(W-1) - 1))       return smp_t'(2**(W-1) - 1);
    else if (s < -(W+1)'(2**(W-1)))     return smp_t'(-(2**(W-1)));
    else                                return smp_t'(s);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_LOAD;
      cnt       <= '0;
      sel       <= '0;
      level     <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_data  <= '0;
      out_sel   <= '0;
      out_cw    <= '0;
    end else begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      unique case (state)
        S_LOAD: if (fft_wr) begin
          cnt <= cnt + 1'b1;
          if (cnt == LOG2N'(N - 1)) state <= S_FFT;
        end
        S_FFT:  state <= S_WAIT;
        S_WAIT: if (fft_done) begin
          state <= S_SCAN;
          cnt   <= '0;
        end
        S_SCAN: begin
          cnt <= cnt + 1'b1;
          if (cnt == LOG2N'(N - 1)) state <= S_PICK;
        end
        S_PICK: begin
          sel   <= best;
          level <= si_level;
          state <= S_OUT;
        end
        S_OUT: begin
          out_valid   <= 1'b1;
          out_first   <= (cnt == '0);
          out_data.re <= sat_add(cand[sel].re, si.re);
          out_data.im <= sat_add(cand[sel].im, si.im);
          out_sel     <= sel;
          out_cw      <= cw;
          cnt         <= cnt + 1'b1;
          if (cnt == LOG2N'(N - 1)) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // The IFFT is only started from a fully loaded buffer and is never
  // written while it runs.
  assert property (@(posedge clk) disable iff (!rst_n) fft_busy |-> !fft_wr);

endmodule
