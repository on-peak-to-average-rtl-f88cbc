// Self-checking testbench of gi_insert: sends symbols of 64 random samples,
// back to back as closely as the block allows (a new symbol starts 16
// clocks into the previous one's output), and checks each 80-sample output
// symbol: samples 48..63 first, then 0..63, out_first on the first, and the
// output starting one clock after the last input sample.
module tb_gi_insert;
  import slm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0;
  cplx_t in_data = '0;
  logic out_valid, out_first;
  cplx_t out_data;
  int checks = 0, failures = 0;
  cplx_t sent [$];
  int nsym_out = 0;

  gi_insert dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  initial begin
    cplx_t sym [N];
    forever begin
      @(posedge clk); #1;
      if (out_valid) begin
        checks++;
        if (!out_first) begin failures++; $display("missing out_first"); end
        for (int k = 0; k < N; k++) sym[k] = sent.pop_front();
        for (int i = 0; i < N + GI_LEN; i++) begin
          cplx_t e;
          e = sym[(i + N - GI_LEN) % N];
          checks++;
          if (!out_valid || out_data != e || (i > 0 && out_first)) begin
            failures++;
            $display("sym %0d i %0d got %h exp %h valid %0d", nsym_out, i, out_data, e, out_valid);
          end
          @(posedge clk); #1;
        end
        nsym_out++;
        checks++;
        if (out_valid && !out_first) begin failures++; $display("output longer than 80"); end
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 30; s++) begin
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        in_valid = 1; in_first = (k == 0);
        in_data = cplx_t'($urandom);
        sent.push_back(in_data);
      end
      @(negedge clk);
      in_valid = 0; in_first = 0;
      // gap: 16 clocks of output must pass before the next symbol
      repeat (s % 2 == 0 ? GI_LEN : 40) @(negedge clk);
    end
    repeat (200) @(negedge clk);
    checks++;
    if (nsym_out != 30) begin failures++; $display("%0d symbols out", nsym_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
