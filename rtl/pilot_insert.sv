// Pilot insertion and subcarrier placement of one spatial stream.
//
// Builds the 64 bins of a 20 MHz HT symbol in bin order 0..63 for the SLM
// chain: bin 0 (DC) and bins 29..35 (band edges) are zero, the four pilot
// bins (subcarriers -21, -7, +7, +21) carry +1, +1, +1, -1, the five
// side-information bins are left empty for the SLM chain to fill, and each
// of the remaining 47 bins takes the next data point from the QAM mapper.
// Reserving the side-information tones is what lowers the bit rate: 47
// instead of 52 data subcarriers.
// Interface: data points come in on dp_valid/dp_ready; bins go out on
// out_valid/out_ready (both handshakes combinational). A data bin is only
// offered when a data point is waiting; the other bins are offered at once.
// The pilot count comes from the thesis's rate tables and the reserved
// tones from its side-information scheme; pilot positions and values are
// those of 802.11 (fixed, without the per-symbol polarity sequence).
module pilot_insert
  import slm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   dp_valid,
  output logic   dp_ready,
  input  cplx_t  dp_point,
  output logic   out_valid,
  input  logic   out_ready,
  output cplx_t  out_data,
  output logic   out_first
);

  logic [LOG2N-1:0] bin;

  typedef enum logic [1:0] {B_NULL, B_PILOT, B_DATA} bin_t;

  function automatic bin_t kind(input logic [LOG2N-1:0] k);
    if (k == '0 || (int'(k) > 28 && int'(k) < 36)) return B_NULL;
    for (int t = 0; t < N_SI; t++)    if (int'(k) == SI_TONES[t])   return B_NULL;
    for (int p = 0; p < N_PILOT; p++) if (int'(k) == PILOT_BINS[p]) return B_PILOT;
    return B_DATA;
  endfunction

  function automatic smp_t pilot_val(input logic [LOG2N-1:0] k);
    for (int p = 0; p < N_PILOT; p++)
      if (int'(k) == PILOT_BINS[p]) return smp_t'(PILOT_SIGN[p] * (1 << FRAC));
    return '0;
  endfunction

  always_comb begin
    out_first   = (bin == '0);
    out_data    = '0;
    out_valid   = 1'b1;
    dp_ready    = 1'b0;
    unique case (kind(bin))
      B_PILOT: out_data.re = pilot_val(bin);
      B_DATA: begin
        out_valid = dp_valid;
        dp_ready  = out_ready;
        out_data  = dp_point;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       bin <= '0;
    else if (out_valid && out_ready)  bin <= bin + 1'b1;
  end

endmodule
