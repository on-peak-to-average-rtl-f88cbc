// Self-checking testbench of ifft64: loads random frequency-domain symbols,
// runs the transform and compares every time sample with a floating-point
// inverse DFT (including the 1/64 factor) within a small tolerance. It also
// checks that the transform takes exactly 6 clocks from start to done.
module tb_ifft64;
  import slm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, start = 0, busy, done;
  logic [LOG2N-1:0] wr_addr = 0;
  cplx_t wr_data = '0;
  cplx_t x_out [N];
  int checks = 0, failures = 0;
  real xr [N], xi [N];

  ifft64 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_symbol(input int kind);
    int cyc;
    real er, ei, maxerr;
    for (int k = 0; k < N; k++) begin
      int vr, vi;
      case (kind)
        0: begin vr = (k == 5) ? 16384 : 0; vi = 0; end     // single tone
        1: begin vr = 8192; vi = -4096; end                 // all bins equal
        default: begin
          vr = int'($urandom_range(0, 32767)) - 16384;       // |component| < 1.0
          vi = int'($urandom_range(0, 32767)) - 16384;
        end
      endcase
      xr[k] = real'(vr) / 16384.0;
      xi[k] = real'(vi) / 16384.0;
      @(negedge clk);
      wr_en = 1; wr_addr = LOG2N'(k); wr_data.re = smp_t'(vr); wr_data.im = smp_t'(vi);
    end
    @(negedge clk); wr_en = 0; start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != LOG2N + 1) begin
      failures++;
      $display("latency: done %0d clocks after start, expected %0d", cyc, LOG2N + 1);
    end
    maxerr = 0.0;
    for (int n = 0; n < N; n++) begin
      er = 0.0; ei = 0.0;
      for (int k = 0; k < N; k++) begin
        real a;
        a = 2.0 * PI * real'(k * n) / real'(N);
        er += xr[k] * $cos(a) - xi[k] * $sin(a);
        ei += xr[k] * $sin(a) + xi[k] * $cos(a);
      end
      er = er / real'(N) * 16384.0;
      ei = ei / real'(N) * 16384.0;
      checks += 2;
      if ((real'(x_out[n].re) - er > 6.0) || (er - real'(x_out[n].re) > 6.0)) begin
        failures++;
        $display("kind %0d n=%0d re got %0d exp %f", kind, n, x_out[n].re, er);
      end
      if ((real'(x_out[n].im) - ei > 6.0) || (ei - real'(x_out[n].im) > 6.0)) begin
        failures++;
        $display("kind %0d n=%0d im got %0d exp %f", kind, n, x_out[n].im, ei);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_symbol(0);
    run_symbol(1);
    for (int t = 0; t < 20; t++) run_symbol(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
