// Self-checking testbench of si_encoder: checks the four codewords against
// rows 2 and 3 of the (7,4) Hamming generator with columns 3 and 4 removed,
// and checks that every pair of codewords differs in at least 3 bits.
module tb_si_encoder;
  logic [1:0] idx;
  logic [4:0] cw;
  logic [4:0] got [4];
  int checks = 0, failures = 0;
  // expected codewords written as cw[4:0]
  localparam logic [4:0] EXP [4] = '{5'b00000, 5'b01111, 5'b10101, 5'b11010};

  si_encoder dut (.idx, .cw);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      idx = 2'(i);
      #1;
      got[i] = cw;
      checks++;
      if (cw !== EXP[i]) begin
        failures++;
        $display("idx %0d: cw %b expected %b", i, cw, EXP[i]);
      end
    end
    for (int i = 0; i < 4; i++)
      for (int j = i + 1; j < 4; j++) begin
        checks++;
        if ($countones(got[i] ^ got[j]) < 3) begin
          failures++;
          $display("distance %0d-%0d below 3", i, j);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
