// Self-checking testbench of scrambler: with the all-ones seed and zero
// data, the output must be the 127-bit 802.11 scrambling sequence that
// starts 00001110 11110010 11001001 ...; with random data it must be the
// data XOR that sequence, repeating with period 127; a reseed restarts it.
module tb_scrambler;
  logic clk = 0, rst_n = 0, init = 0, in_valid = 0, in_bit = 0;
  logic [6:0] seed = 7'h7f;
  logic out_valid, out_bit;
  int checks = 0, failures = 0;
  localparam string SEQ = {"00001110111100101100100100000010001001100010111010110110000011001101010011100111101101000010101011111010010100011011100011111111"};

  scrambler dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      @(negedge clk); init = 1; seed = 7'h7f;
      @(negedge clk); init = 0;
      for (int i = 0; i < 127 * 3; i++) begin
        logic d, e;
        d = (rep == 0) ? 1'b0 : 1'($urandom);
        in_valid = 1; in_bit = d;
        e = d ^ (SEQ[i % 127] == "1");
        @(negedge clk);
        checks++;
        if (!out_valid || out_bit != e) begin
          failures++;
          if (failures < 10) $display("rep %0d bit %0d: got %b exp %b", rep, i, out_bit, e);
        end
        // idle clocks must not advance the sequence
        if (i % 17 == 5) begin in_valid = 0; @(negedge clk); end
      end
      in_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
