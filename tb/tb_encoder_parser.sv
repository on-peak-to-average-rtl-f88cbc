// Self-checking testbench of encoder_parser: random bits with gaps; bit i
// since the last init must appear at encoder i mod N_ES only.
module tb_encoder_parser;
  localparam int NE = 3;
  logic clk = 0, rst_n = 0, init = 0, in_valid = 0, in_bit = 0;
  logic out_valid [NE], out_bit [NE];
  int checks = 0, failures = 0;

  encoder_parser #(.N_ES(NE)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idx;
    idx = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      init = ($urandom_range(0, 199) == 0);
      in_valid = !init && ($urandom_range(0, 3) != 0);
      in_bit = 1'($urandom);
      #1;
      for (int e = 0; e < NE; e++) begin
        checks++;
        if (out_valid[e] != (in_valid && (idx % NE == e)) || (out_valid[e] && out_bit[e] != in_bit)) begin
          failures++;
          $display("clock %0d encoder %0d: valid %0d (bit index %0d)", c, e, out_valid[e], idx);
        end
      end
      if (init) idx = 0; else if (in_valid) idx++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
