// Self-checking testbench of papr_select: streams 64 random samples per
// candidate with different amplitude profiles, computes each candidate's
// PAPR in floating point and checks that the selector picks the minimum
// (a candidate within 1e-6 relative of the minimum is also accepted), and
// that peak and energy match exactly.
module tb_papr_select;
  import slm_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  cplx_t cand [M];
  logic [1:0] best;
  logic [2*W-1:0] peak [M];
  logic [2*W+LOG2N-1:0] energy [M];
  int checks = 0, failures = 0;

  papr_select dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real pk [M], en_r [M], papr [M], pmin;
    longint epk [M], een [M];
    int spike [M];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < M; i++) begin
        pk[i] = 0.0; en_r[i] = 0.0; epk[i] = 0; een[i] = 0;
        spike[i] = int'($urandom_range(0, 63));
      end
      for (int n = 0; n < N; n++) begin
        for (int i = 0; i < M; i++) begin
          int r, q, amp;
          longint p;
          amp = (n == spike[i]) ? int'($urandom_range(2000, 30000)) : int'($urandom_range(1000, 6000));
          r = int'($urandom_range(0, 2*amp)) - amp;
          q = int'($urandom_range(0, 2*amp)) - amp;
          cand[i].re = smp_t'(r); cand[i].im = smp_t'(q);
          p = longint'(r) * r + longint'(q) * q;
          if (p > epk[i]) epk[i] = p;
          een[i] += p;
        end
        clr = (n == 0); en = 1;
        @(negedge clk);
      end
      clr = 0; en = 0;
      #1;
      pmin = 1.0e30;
      for (int i = 0; i < M; i++) begin
        papr[i] = real'(epk[i]) / (real'(een[i]) / 64.0);
        if (papr[i] < pmin) pmin = papr[i];
        checks += 2;
        if (longint'(peak[i]) != epk[i] || longint'(energy[i]) != een[i]) begin
          failures++;
          $display("cand %0d peak %0d/%0d energy %0d/%0d", i, peak[i], epk[i], energy[i], een[i]);
        end
      end
      checks++;
      if (papr[best] > pmin * (1.0 + 1.0e-6)) begin
        failures++;
        $display("symbol %0d: picked %0d (PAPR %f), minimum %f", t, best, papr[best], pmin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
