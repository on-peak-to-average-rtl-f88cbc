// Minimum-PAPR selector of the SLM transmitter.
//
// While en is high, one time sample of each of the M candidate sequences
// arrives per clock. For every candidate the block keeps the peak
// instantaneous power max|s|^2 and the energy sum|s|^2. PAPR_i is
// peak_i / (energy_i / 64); candidate i beats candidate b when
// peak_i * energy_b < peak_b * energy_i, so no divider is needed. The
// candidates are compared in order 0..M-1 and a tie keeps the lower index,
// so the unrotated symbol wins ties.
//
// Interface: pulse clr on the clock before the first sample of a symbol
// (or together with it: clr has priority and the sample in that clock is
// counted). best is combinational from the accumulators and is valid on
// the clock after the last sample. peak and energy are exposed for test.
// Selecting the sequence of lowest PAPR follows the thesis; measuring it on
// the 64 Nyquist-rate samples and the cross-multiplied comparison are
// choices of this design.
module papr_select
  import slm_pkg::*;
#(
  parameter int NC = M
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clr,
  input  logic                   en,
  input  cplx_t                  cand   [NC],
  output logic [$clog2(NC)-1:0]  best,
  output logic [2*W-1:0]         peak   [NC],
  output logic [2*W+LOG2N-1:0]   energy [NC]
);

  logic [2*W-1:0] pw [NC];

  always_comb
    for (int i = 0; i < NC; i++)
      pw[i] = (2*W)'($signed(cand[i].re) * $signed(cand[i].re))
            + (2*W)'($signed(cand[i].im) * $signed(cand[i].im));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NC; i++) begin
        peak[i]   <= '0;
        energy[i] <= '0;
      end
    end else if (clr) begin
      for (int i = 0; i < NC; i++) begin
        peak[i]   <= en ? pw[i] : '0;
        energy[i] <= en ? (2*W+LOG2N)'(pw[i]) : '0;
      end
    end else if (en) begin
      for (int i = 0; i < NC; i++) begin
        if (pw[i] > peak[i]) peak[i] <= pw[i];
        energy[i] <= energy[i] + (2*W+LOG2N)'(pw[i]);
      end
    end
  end

  always_comb begin
    logic [4*W+LOG2N-1:0] lhs, rhs;
    best = '0;
    for (int i = 1; i < NC; i++) begin
      lhs = (4*W+LOG2N)'(peak[i]) * (4*W+LOG2N)'(energy[best]);
      rhs = (4*W+LOG2N)'(peak[best]) * (4*W+LOG2N)'(energy[i]);
      if (lhs < rhs) best = ($clog2(NC))'(i);
    end
  end

endmodule
