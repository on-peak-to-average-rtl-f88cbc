// Self-checking testbench of slm_tx_chain. Random 16-QAM symbols on the 56
// used subcarriers of a 20 MHz 802.11n symbol go in. A floating-point model
// forms the four candidates by rotating the subcarriers with the phase
// vectors and taking a full inverse DFT each (the IFFT-bank form of SLM),
// measures their PAPR and checks that the chain sends a candidate whose
// PAPR is within 1% of the minimum, that the codeword matches the chosen
// index, and that every output sample equals that candidate plus the
// side-information tones within a few LSB. It also checks the 74-clock
// delay from the clock edge that takes the last input sample to the first output sample, and that
// every candidate gets chosen at least once.
module tb_slm_tx_chain;
  import slm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  cplx_t in_data = '0;
  smp_t si_level = '0;
  logic out_valid, out_first;
  cplx_t out_data;
  logic [1:0] out_sel;
  logic [4:0] out_cw;
  int checks = 0, failures = 0;
  int picked [M];
  localparam logic [4:0] CWS [4] = '{5'b00000, 5'b01111, 5'b10101, 5'b11010};
  localparam int QAM [4] = '{-15543, -5181, 5181, 15543};
  localparam int LEVELS [3] = '{16384, 11469, 6554};
  real fr [N], fi [N];
  real cr [M][N], ci [M][N], papr [M];

  slm_tx_chain dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic used_bin(input int k);
    if (k == 0 || (k > 28 && k < 36)) return 1'b0;
    for (int t = 0; t < N_SI; t++) if (k == SI_TONES[t]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic model();
    pvec_t pv [M];
    pv[0] = '{2'd0, 2'd0, 2'd0, 2'd0};
    pv[1] = PVEC1; pv[2] = PVEC2; pv[3] = PVEC3;
    for (int i = 0; i < M; i++) begin
      real pk, en;
      pk = 0.0; en = 0.0;
      for (int n = 0; n < N; n++) begin
        real sr, si;
        sr = 0.0; si = 0.0;
        for (int k = 0; k < N; k++) begin
          real ar, ai, br, bi, a;
          ar = fr[k]; ai = fi[k];
          case (int'(pv[i][k % 4]))
            0: begin br = ar;  bi = ai;  end
            1: begin br = -ai; bi = ar;  end
            2: begin br = -ar; bi = -ai; end
            default: begin br = ai; bi = -ar; end
          endcase
          a = 2.0 * PI * real'(k * n) / real'(N);
          sr += br * $cos(a) - bi * $sin(a);
          si += br * $sin(a) + bi * $cos(a);
        end
        cr[i][n] = sr / 64.0; ci[i][n] = si / 64.0;
        if (cr[i][n]*cr[i][n] + ci[i][n]*ci[i][n] > pk) pk = cr[i][n]*cr[i][n] + ci[i][n]*ci[i][n];
        en += cr[i][n]*cr[i][n] + ci[i][n]*ci[i][n];
      end
      papr[i] = pk / (en / 64.0);
    end
  endtask

  task automatic run_symbol(input int lvl);
    int lat, s;
    real pmin;
    for (int k = 0; k < N; k++) begin
      int vr, vi;
      vr = used_bin(k) ? QAM[$urandom_range(0, 3)] : 0;
      vi = used_bin(k) ? QAM[$urandom_range(0, 3)] : 0;
      fr[k] = real'(vr); fi[k] = real'(vi);
      // drive garbage on the side-information bins: the chain must drop it
      if (!used_bin(k) && k != 0 && !(k > 28 && k < 36)) begin vr = 12345; vi = -999; end
      while (!in_ready) begin @(posedge clk); #1; end
      in_valid = 1; in_data.re = smp_t'(vr); in_data.im = smp_t'(vi);
      @(posedge clk); #1;
    end
    in_valid = 0;
    si_level = smp_t'(lvl);
    model();
    lat = 0;
    while (!out_first) begin @(posedge clk); #1; lat++; end
    checks++;
    if (lat != 74) begin failures++; $display("latency %0d, expected 74", lat); end
    s = int'(out_sel);
    picked[s]++;
    pmin = papr[0];
    for (int i = 1; i < M; i++) if (papr[i] < pmin) pmin = papr[i];
    checks += 2;
    if (papr[s] > pmin * 1.01) begin
      failures++; $display("picked %0d PAPR %f, minimum %f", s, papr[s], pmin);
    end
    if (out_cw != CWS[s]) begin failures++; $display("codeword %b for index %0d", out_cw, s); end
    for (int n = 0; n < N; n++) begin
      real er, ei;
      er = cr[s][n]; ei = ci[s][n];
      for (int t = 0; t < N_SI; t++) begin
        real a, d;
        d = CWS[s][t] ? -1.0 : 1.0;
        a = 2.0 * PI * real'(SI_TONES[t] * n) / real'(N);
        er += d * $cos(a) * real'(lvl) / 64.0;
        ei += d * $sin(a) * real'(lvl) / 64.0;
      end
      checks++;
      if (!out_valid || real'(out_data.re) - er > 8.0 || er - real'(out_data.re) > 8.0 ||
          real'(out_data.im) - ei > 8.0 || ei - real'(out_data.im) > 8.0) begin
        failures++;
        $display("n=%0d valid %0d got (%0d,%0d) exp (%f,%f)", n, out_valid, out_data.re, out_data.im, er, ei);
      end
      @(posedge clk); #1;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 40; t++) run_symbol(LEVELS[t % 3]);
    for (int i = 0; i < M; i++) begin
      checks++;
      if (picked[i] == 0) begin failures++; $display("candidate %0d never chosen", i); end
    end
    $display("chosen: %0d %0d %0d %0d", picked[0], picked[1], picked[2], picked[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
