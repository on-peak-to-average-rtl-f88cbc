// Self-checking testbench of stream_parser: for each modulation, sends
// random coded pairs with gaps, collects each stream's bits in order and
// compares with the round-robin split in blocks of max(1, N_BPSC/2) bits.
module tb_stream_parser;
  import slm_pkg::*;
  localparam int NS = 4;
  logic clk = 0, rst_n = 0, init = 0, in_valid = 0;
  mod_t mod = MOD_BPSK;
  logic [1:0] in_bits = '0;
  logic [1:0] out_valid [NS], out_bits [NS];
  int checks = 0, failures = 0;
  bit got [NS][$];

  stream_parser #(.N_SS(NS)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) #1
    for (int k = 0; k < NS; k++)
      for (int b = 0; b < 2; b++)
        if (out_valid[k][b]) got[k].push_back(out_bits[k][b]);

  initial begin
    bit sent [$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 4; m++) begin
      int s;
      mod = mod_t'(m);
      s = (bits_per_sc(mod) / 2 < 1) ? 1 : bits_per_sc(mod) / 2;
      init = 1; @(negedge clk); init = 0;
      sent.delete();
      for (int k = 0; k < NS; k++) got[k].delete();
      for (int c = 0; c < 600; c++) begin
        in_valid = ($urandom_range(0, 4) != 0);
        in_bits = 2'($urandom);
        if (in_valid) begin sent.push_back(in_bits[0]); sent.push_back(in_bits[1]); end
        @(negedge clk);
      end
      in_valid = 0;
      repeat (3) @(negedge clk);
      for (int k = 0; k < NS; k++) begin
        int j;
        j = 0;
        for (int i = 0; i < sent.size(); i++) begin
          if ((i / s) % NS == k) begin
            checks++;
            if (j >= got[k].size() || got[k][j] != sent[i]) begin
              failures++;
              if (failures < 10) $display("mod %0d stream %0d bit %0d wrong", m, k, j);
            end
            j++;
          end
        end
        checks++;
        if (j != got[k].size()) begin failures++; $display("mod %0d stream %0d: %0d bits, expected %0d", m, k, got[k].size(), j); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
