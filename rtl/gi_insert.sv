// Guard-interval (cyclic prefix) insertion for one transmit chain.
//
// A 20 MHz 802.11n symbol lasts T_SYM = 4 us while the IFFT period is
// T_FFT = 3.2 us, so the guard interval is 0.8 us = 16 samples: the last
// 16 of the 64 time samples are sent again in front of the symbol, giving
// 80 samples per symbol.
//
// The 64 samples are written into a buffer as they arrive (in_first marks
// sample 0). On the clock after the 64th sample, the block emits 80
// samples, one per clock: buffer[(i + 48) mod 64] for i = 0..79, with
// out_first on i = 0. The next symbol may start arriving once at least 16
// output samples have gone, because the read pointer then stays ahead of
// the write pointer; an assertion checks this.
// Interface timing: out_valid rises 1 clock after the last input sample.
// T_SYM, T_FFT and the 20 MHz rate are from the 802.11n timing table; the
// buffering scheme is a choice of this design.
module gi_insert
  import slm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  logic   in_first,
  input  cplx_t  in_data,
  output logic   out_valid,
  output logic   out_first,
  output cplx_t  out_data
);

  localparam int OUT_LEN = N + GI_LEN;

  cplx_t              buffer [N];
  logic [LOG2N-1:0]   wptr;
  logic [6:0]         ocnt;
  logic               sending;
  logic [LOG2N-1:0]   widx;

  assign widx = in_first ? '0 : wptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr      <= '0;
      ocnt      <= '0;
      sending   <= 1'b0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_data  <= '0;
      for (int k = 0; k < N; k++) buffer[k] <= '0;
    end else begin
      if (in_valid) begin
        buffer[widx] <= in_data;
        wptr         <= widx + 1'b1;
      end
      out_valid <= 1'b0;
      out_first <= 1'b0;
      if (sending) begin
        out_valid <= 1'b1;
        out_first <= (ocnt == '0);
        out_data  <= buffer[LOG2N'(int'(ocnt) + N - GI_LEN)];
        if (ocnt == 7'(OUT_LEN - 1)) begin
          sending <= 1'b0;
          ocnt    <= '0;
        end else begin
          ocnt <= ocnt + 1'b1;
        end
      end
      if (in_valid && widx == LOG2N'(N - 1)) begin
        sending <= 1'b1;
        ocnt    <= '0;
      end
    end
  end

  // A new symbol must not overwrite the tail still to be sent as prefix.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (in_valid && sending) |-> (ocnt >= 7'(GI_LEN)));

endmodule
