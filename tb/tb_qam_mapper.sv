// Self-checking testbench of qam_mapper: every bit pattern of every
// modulation against the 802.11 Gray tables written out as lists, and the
// average power of each constellation within 0.1% of 1.
module tb_qam_mapper;
  import slm_pkg::*;
  mod_t mod;
  logic [5:0] bits;
  cplx_t point;
  int checks = 0, failures = 0;
  // level by axis bits read as a number with the first bit as MSB
  localparam int L2 [4] = '{-3, -1, 3, 1};                 // 00 01 10 11
  localparam int L3 [8] = '{-7, -5, -1, -3, 7, 5, 1, 3};   // 000 .. 111
  localparam real K [4] = '{1.0, 0.70710678, 0.31622777, 0.15430335};

  qam_mapper dut (.mod, .bits, .point);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++) begin
      int nb;
      real pw;
      nb = bits_per_sc(mod_t'(m));
      pw = 0.0;
      for (int v = 0; v < (1 << nb); v++) begin
        int li, lq;
        mod = mod_t'(m);
        bits = 6'(v);
        #1;
        case (m)
          0: begin li = bits[0] ? 1 : -1; lq = 0; end
          1: begin li = bits[0] ? 1 : -1; lq = bits[1] ? 1 : -1; end
          2: begin li = L2[{bits[0], bits[1]}]; lq = L2[{bits[2], bits[3]}]; end
          default: begin li = L3[{bits[0], bits[1], bits[2]}]; lq = L3[{bits[3], bits[4], bits[5]}]; end
        endcase
        checks++;
        if (real'(point.re) - real'(li) * K[m] * 16384.0 > 1.0 || real'(li) * K[m] * 16384.0 - real'(point.re) > 1.0 ||
            real'(point.im) - real'(lq) * K[m] * 16384.0 > 1.0 || real'(lq) * K[m] * 16384.0 - real'(point.im) > 1.0) begin
          failures++;
          $display("mod %0d bits %b: got (%0d,%0d) levels (%0d,%0d)", m, bits, point.re, point.im, li, lq);
        end
        pw += (real'(point.re) * real'(point.re) + real'(point.im) * real'(point.im)) / (16384.0 * 16384.0);
      end
      pw = pw / real'(1 << nb);
      checks++;
      if (pw < 0.999 || pw > 1.001) begin failures++; $display("mod %0d power %f", m, pw); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
