// Self-checking testbench of pilot_insert: feeds numbered data points with
// random gaps and a consumer with random stalls, and checks every bin of
// several symbols: zeros at DC, band edges and side-information bins,
// +1/+1/+1/-1 at subcarriers -21/-7/+7/+21, and the data points in order
// on the other 47 bins.
module tb_pilot_insert;
  import slm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic dp_valid = 0, dp_ready, out_valid, out_ready = 0, out_first;
  cplx_t dp_point = '0, out_data;
  int checks = 0, failures = 0;
  int next_dp = 0, next_exp = 0, nbin = 0;

  pilot_insert dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int exp_kind(input int k);   // 0 null, 1 pilot, 2 data
    if (k == 0 || (k >= 29 && k <= 35)) return 0;
    if (k == 3 || k == 15 || k == 27 || k == 39 || k == 51) return 0;
    if (k == 7 || k == 21 || k == 43 || k == 57) return 1;
    return 2;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (nbin < 64 * 6) begin
      dp_valid = ($urandom_range(0, 2) != 0);
      dp_point.re = smp_t'(next_dp); dp_point.im = smp_t'(-next_dp);
      out_ready = ($urandom_range(0, 3) != 0);
      #1;
      if (out_valid && out_ready) begin
        int k, kd;
        k = nbin % 64;
        kd = exp_kind(k);
        checks++;
        if (out_first != (k == 0)) begin failures++; $display("bin %0d first %0d", k, out_first); end
        checks++;
        case (kd)
          0: if (out_data != '0) begin failures++; $display("bin %0d not empty", k); end
          1: if (out_data.im != 0 || out_data.re != ((k == 21) ? -16384 : 16384)) begin
               failures++; $display("pilot bin %0d = %0d", k, out_data.re); end
          default: begin
            if (out_data.re != smp_t'(next_exp) || out_data.im != smp_t'(-next_exp) || !dp_ready) begin
              failures++; $display("data bin %0d got %0d exp %0d", k, out_data.re, next_exp); end
            next_exp++;
          end
        endcase
        if (kd != 2 && dp_ready) begin failures++; $display("bin %0d consumed a data point", k); end
        nbin++;
      end
      if (dp_valid && dp_ready) next_dp++;
      @(negedge clk);
    end
    checks++;
    if (next_exp != 6 * N_DATA_SC) begin failures++; $display("%0d data points for 6 symbols", next_exp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
