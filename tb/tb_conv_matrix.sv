// Self-checking testbench of conv_matrix: for random time-domain symbols x
// it computes, in floating point, s = IDFT(b .* DFT(x)) for each of the
// three phase vectors, and compares with the three conversion-matrix
// instances fed with x[n], x[n-16], x[n-32], x[n-48].
module tb_conv_matrix;
  import slm_pkg::*;
  cplx_t x_lag [4];
  cplx_t s1, s2, s3;
  int checks = 0, failures = 0;
  real xr [N], xi [N], fr [N], fi [N];
  logic clk = 0;

  conv_matrix #(.PVEC(PVEC1)) u1 (.x_lag, .s(s1));
  conv_matrix #(.PVEC(PVEC2)) u2 (.x_lag, .s(s2));
  conv_matrix #(.PVEC(PVEC3)) u3 (.x_lag, .s(s3));

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void rot(input int q, input real ar, input real ai,
                              output real br, output real bi);
    case (q % 4)
      0: begin br = ar;  bi = ai;  end
      1: begin br = -ai; bi = ar;  end
      2: begin br = -ar; bi = -ai; end
      default: begin br = ai; bi = -ar; end
    endcase
  endfunction

  task automatic check_vec(input pvec_t pv, input int which);
    real sr [N], si [N], br, bi;
    // frequency domain of x, rotated by the phase vector
    for (int k = 0; k < N; k++) begin
      real ar, ai;
      ar = 0.0; ai = 0.0;
      for (int m = 0; m < N; m++) begin
        real a;
        a = -2.0 * PI * real'(k * m) / real'(N);
        ar += xr[m] * $cos(a) - xi[m] * $sin(a);
        ai += xr[m] * $sin(a) + xi[m] * $cos(a);
      end
      rot(int'(pv[k % 4]), ar, ai, br, bi);
      fr[k] = br; fi[k] = bi;
    end
    for (int n = 0; n < N; n++) begin
      sr[n] = 0.0; si[n] = 0.0;
      for (int k = 0; k < N; k++) begin
        real a;
        a = 2.0 * PI * real'(k * n) / real'(N);
        sr[n] += fr[k] * $cos(a) - fi[k] * $sin(a);
        si[n] += fr[k] * $sin(a) + fi[k] * $cos(a);
      end
      sr[n] /= real'(N); si[n] /= real'(N);
    end
    for (int n = 0; n < N; n++) begin
      cplx_t got;
      for (int l = 0; l < 4; l++) begin
        x_lag[l].re = smp_t'(int'(xr[(n - 16*l + N) % N]));
        x_lag[l].im = smp_t'(int'(xi[(n - 16*l + N) % N]));
      end
      #1;
      got = (which == 1) ? s1 : (which == 2) ? s2 : s3;
      checks += 2;
      if (real'(got.re) - sr[n] > 1.5 || sr[n] - real'(got.re) > 1.5 ||
          real'(got.im) - si[n] > 1.5 || si[n] - real'(got.im) > 1.5) begin
        failures++;
        $display("vec %0d n=%0d got (%0d,%0d) exp (%f,%f)", which, n, got.re, got.im, sr[n], si[n]);
      end
    end
  endtask

  initial begin
    for (int t = 0; t < 8; t++) begin
      for (int n = 0; n < N; n++) begin
        xr[n] = real'(int'($urandom_range(0, 16000)) - 8000);
        xi[n] = real'(int'($urandom_range(0, 16000)) - 8000);
      end
      check_vec(PVEC1, 1);
      check_vec(PVEC2, 2);
      check_vec(PVEC3, 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
