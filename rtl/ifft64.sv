// 64-point inverse FFT that completes one radix-2 stage per clock, so a
// whole symbol is transformed in log2(64) = 6 clocks after loading.
//
// How it works: the 64 complex samples sit in a register array. Every
// clock, 32 butterflies read the pairs (i, i+32) and write their sum to
// position 2i and their twiddled difference to position 2i+1
// (constant-geometry decimation-in-frequency). Because the wiring is the
// same in every stage, only the twiddle of butterfly i changes with the
// stage s: exponent (i >> s) << s of exp(+j*2*pi/64). After six stages the
// array holds the time samples in bit-reversed order; x_out presents them
// in natural order. Each stage halves its results, so the transform
// includes the 1/N factor: x[n] = (1/64) * sum_k X[k] exp(+j*2*pi*k*n/64).
// Results are truncated (floor) after every stage.
//
// Interface: write the 64 frequency-domain samples X[k] with wr_en /
// wr_addr = k / wr_data while idle. Pulse start; busy is high for exactly
// 6 clocks and done pulses on the clock after the last stage, when x_out
// is valid. x_out stays valid until the next write or start.
//
// The one-stage-per-clock schedule follows the FPGA estimate of the thesis
// (log2 N stages, each within one 20 MHz clock). The constant-geometry
// ordering, Q2.14 arithmetic and truncation are choices of this design.
module ifft64
  import slm_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                wr_en,
  input  logic [LOG2N-1:0]    wr_addr,
  input  cplx_t               wr_data,
  input  logic                start,
  output logic                busy,
  output logic                done,
  output cplx_t               x_out [N]
);

  localparam tw_tab_t COS_T = mk_cos_tab();
  localparam tw_tab_t SIN_T = mk_sin_tab();

  cplx_t                 mem [N];
  cplx_t                 nxt [N];
  logic [2:0]            stage;

  // One constant-geometry stage.
  always_comb begin
    for (int i = 0; i < N/2; i++) begin
      logic signed [W:0]   ar, ai, br, bi, dr, di;
      logic signed [W+1:0] sr, si;
      logic signed [2*W+2:0] pr, pi_;
      logic [LOG2N-1:0]    e;
      tw_t                 c, s;
      ar = {mem[i].re[W-1], mem[i].re};
      ai = {mem[i].im[W-1], mem[i].im};
      br = {mem[i+N/2].re[W-1], mem[i+N/2].re};
      bi = {mem[i+N/2].im[W-1], mem[i+N/2].im};
      sr = (W+2)'(ar) + (W+2)'(br);
      si = (W+2)'(ai) + (W+2)'(bi);
      dr = ar - br;
      di = ai - bi;
      e  = LOG2N'((i >> stage) << stage);
      c  = COS_T[e];
      s  = SIN_T[e];
      pr  = (2*W+3)'(dr * c) - (2*W+3)'(di * s);
      pi_ = (2*W+3)'(dr * s) + (2*W+3)'(di * c);
      nxt[2*i].re   = W'(sr >>> 1);
      nxt[2*i].im   = W'(si >>> 1);
      nxt[2*i+1].re = W'(pr >>> (FRAC + 1));
      nxt[2*i+1].im = W'(pi_ >>> (FRAC + 1));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      stage <= '0;
      for (int k = 0; k < N; k++) mem[k] <= '0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        mem <= nxt;
        if (stage == 3'(LOG2N - 1)) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          stage <= '0;
        end else begin
          stage <= stage + 3'd1;
        end
      end else if (start) begin
        busy  <= 1'b1;
        stage <= '0;
      end else if (wr_en) begin
        mem[wr_addr] <= wr_data;
      end
    end
  end

  always_comb
    for (int n = 0; n < N; n++) x_out[n] = mem[bitrev(LOG2N'(n))];

endmodule
