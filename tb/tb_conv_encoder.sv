// Self-checking testbench of conv_encoder: feeds random bits with gaps and
// packet restarts, and compares every coded pair with a reference that
// convolves the input with the generator masks 133 and 171 (octal, most
// significant tap = current bit).
module tb_conv_encoder;
  logic clk = 0, rst_n = 0, init = 0, in_valid = 0, in_bit = 0;
  logic out_valid, out_a, out_b;
  int checks = 0, failures = 0;
  logic [5:0] prev;   // prev[0] = most recent previous bit
  logic [6:0] win;    // win[6] = current bit, win[0] = oldest
  localparam logic [6:0] G0 = 7'o133, G1 = 7'o171;
  logic ea, eb;
  logic pending = 0;

  conv_encoder dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (pending) begin
        checks++;
        if (!out_valid || out_a != ea || out_b != eb) begin
          failures++;
          $display("bit %0d: got %b%b exp %b%b valid %0d", i, out_a, out_b, ea, eb, out_valid);
        end
      end else begin
        checks++;
        if (out_valid) begin failures++; $display("unexpected out_valid"); end
      end
      init = ($urandom_range(0, 499) == 0);
      in_valid = ($urandom_range(0, 3) != 0);
      in_bit = 1'($urandom);
      pending = 0;
      if (init) prev = '0;
      else if (in_valid) begin
        for (int t = 0; t < 6; t++) win[5 - t] = prev[t];
        win[6] = in_bit;
        ea = ^(win & G0);
        eb = ^(win & G1);
        pending = 1;
        prev = {prev[4:0], in_bit};
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
