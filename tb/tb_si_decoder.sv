// Self-checking testbench of si_decoder: for every index, sends the
// codeword with no error (expect the index, no flag), with every single
// bit error (expect the index, corrected) and with every double error
// (a double error either lands one bit away from another codeword and is
// miscorrected, or is flagged as detected; it never decodes to the sent
// index without a flag). The number of flagged double errors is checked
// against a brute-force count over the codeword table.
module tb_si_decoder;
  logic [4:0] rx;
  logic [1:0] idx;
  logic corrected, detected;
  int checks = 0, failures = 0;
  int miscorrected = 0, flagged = 0;
  // codewords as cw[4:0]
  localparam logic [4:0] CW [4] = '{5'b00000, 5'b01111, 5'b10101, 5'b11010};

  si_decoder dut (.rx, .idx, .corrected, .detected);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      rx = CW[i]; #1;
      checks++;
      if (idx != 2'(i) || corrected || detected) begin
        failures++; $display("clean %0d: idx %0d c %0d d %0d", i, idx, corrected, detected);
      end
      for (int b = 0; b < 5; b++) begin
        rx = CW[i] ^ 5'(1 << b); #1;
        checks++;
        if (idx != 2'(i) || !corrected || detected) begin
          failures++; $display("1err %0d bit %0d: idx %0d c %0d d %0d", i, b, idx, corrected, detected);
        end
      end
      for (int b = 0; b < 5; b++)
        for (int c = b + 1; c < 5; c++) begin
          rx = CW[i] ^ 5'(1 << b) ^ 5'(1 << c); #1;
          checks++;
          if (detected) flagged++;
          else if (idx != 2'(i)) miscorrected++;
          else begin
            failures++; $display("2err %0d: decoded to itself without a flag", i);
          end
        end
    end
    // 40 double-error patterns in all; count those that should be flagged
    begin
      int exp_flag;
      exp_flag = 0;
      for (int i = 0; i < 4; i++)
        for (int b = 0; b < 5; b++)
          for (int c = b + 1; c < 5; c++) begin
            logic [4:0] w;
            int dm;
            w = CW[i] ^ 5'(1 << b) ^ 5'(1 << c);
            dm = 5;
            for (int j = 0; j < 4; j++)
              if ($countones(w ^ CW[j]) < dm) dm = $countones(w ^ CW[j]);
            if (dm >= 2) exp_flag++;
          end
      checks++;
      if (flagged != exp_flag || flagged + miscorrected != 40) begin
        failures++;
        $display("double errors: flagged %0d (exp %0d) miscorrected %0d", flagged, exp_flag, miscorrected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
