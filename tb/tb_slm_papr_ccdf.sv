// PAPR-statistics workload for slm_tx_chain: how much the M = 4 SLM chain
// lowers the PAPR of random 20 MHz symbols, and what the side-information
// tones cost.
// NSYM random QPSK symbols (51 data bins, pilots at +-1, reserved bins
// empty) are each sent through the chain four times, with the
// side-information level a = 0, 0.4, 0.7 and 1. From the 64 output
// samples the testbench measures the PAPR of what was sent; a
// floating-point inverse DFT gives the PAPR of the same symbol without SLM.
// Checks:
//  - per symbol, with a = 0, the sent PAPR is not above the original one
//    (within 2% for rounding): SLM never makes a symbol worse;
//  - over all symbols, PAPR > 8 dB happens at least 3 times less often
//    after SLM than before (the complementary CDF drops);
//  - the mean PAPR with a = 1 is above the mean with a = 0 (the
//    side-information tones take no part in the minimisation).
// The complementary CDF at 5..10 dB and the mean PAPR per level are
// printed.
module tb_slm_papr_ccdf;
  import slm_pkg::*;
  import slm_ref_pkg::*;

  localparam int NSYM = 300;
  localparam int LV [4] = '{0, 6554, 11469, 16384};
  localparam int QPSK = 11585;                    // 16384 / sqrt(2)

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  cplx_t in_data = '0;
  smp_t si_level = '0;
  logic out_valid, out_first;
  cplx_t out_data;
  logic [1:0] out_sel;
  logic [4:0] out_cw;
  int checks = 0, failures = 0;

  slm_tx_chain dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (NSYM * 4 * 260 + 1000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real db(input real x);
    return 10.0 * $log10(x);
  endfunction

  // send one symbol and return the PAPR of the 64 samples that come out
  task automatic run(input int re_v [N], input int im_v [N], input int lvl, output real p);
    sym_t tr, ti;
    si_level = smp_t'(lvl);
    for (int k = 0; k < N; k++) begin
      while (!in_ready) begin @(posedge clk); #1; end
      in_valid = 1; in_data.re = smp_t'(re_v[k]); in_data.im = smp_t'(im_v[k]);
      @(posedge clk); #1;
    end
    in_valid = 0;
    while (!out_first) begin @(posedge clk); #1; end
    for (int n = 0; n < N; n++) begin
      cplx_t g;
      g = out_data;
      tr[n] = real'(g.re); ti[n] = real'(g.im);
      @(posedge clk); #1;
    end
    p = papr(tr, ti);
  endtask

  initial begin
    int cnt_orig [11], cnt_slm [11];
    real mean [4];
    foreach (cnt_orig[i]) begin cnt_orig[i] = 0; cnt_slm[i] = 0; end
    foreach (mean[i]) mean[i] = 0.0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int s = 0; s < NSYM; s++) begin
      int re_v [N], im_v [N];
      sym_t fr, fi, tr, ti;
      real p0, p;
      for (int k = 0; k < N; k++) begin
        re_v[k] = 0; im_v[k] = 0;
        if (k == 7 || k == 21 || k == 43 || k == 57) re_v[k] = (k == 21) ? -16384 : 16384;
        else if (data_bin(k)) begin
          re_v[k] = $urandom_range(0, 1) ? QPSK : -QPSK;
          im_v[k] = $urandom_range(0, 1) ? QPSK : -QPSK;
        end
        fr[k] = real'(re_v[k]); fi[k] = real'(im_v[k]);
      end
      candidate(0, fr, fi, tr, ti);
      p0 = papr(tr, ti);
      for (int l = 0; l < 4; l++) begin
        run(re_v, im_v, LV[l], p);
        mean[l] += db(p) / real'(NSYM);
        if (l == 0) begin
          checks++;
          if (p > p0 * 1.02) begin
            failures++;
            $display("symbol %0d: sent PAPR %f dB above original %f dB", s, db(p), db(p0));
          end
          for (int t = 5; t <= 10; t++) begin
            if (db(p0) > real'(t)) cnt_orig[t]++;
            if (db(p)  > real'(t)) cnt_slm[t]++;
          end
        end
      end
    end
    $display("P(PAPR > x dB) over %0d symbols, without SLM / with SLM (M = 4):", NSYM);
    for (int t = 5; t <= 10; t++)
      $display("  %2d dB: %f / %f", t, real'(cnt_orig[t]) / real'(NSYM), real'(cnt_slm[t]) / real'(NSYM));
    $display("mean PAPR with side information a = 0, 0.4, 0.7, 1: %f %f %f %f dB", mean[0], mean[1], mean[2], mean[3]);
    checks += 2;
    if (cnt_orig[8] == 0 || cnt_slm[8] * 3 > cnt_orig[8]) begin
      failures++; $display("SLM did not lower P(PAPR > 8 dB) enough");
    end
    if (mean[3] <= mean[0]) begin
      failures++; $display("side information at a = 1 did not raise the mean PAPR");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
