// Receiver-side decoder of the (5,2) shortened Hamming side-information
// code (see si_encoder). It compares the five hard-decided BPSK bits with
// the four codewords and returns the index of the nearest one. With
// minimum distance 3, a single bit error is corrected (corrected = 1);
// a word at distance 2 or more from every codeword is flagged as an
// uncorrectable error (detected = 1, idx then holds the nearest codeword
// with the lowest index). Purely combinational.
// The thesis states the correcting and detecting power of the code; the
// nearest-codeword search is the simplest decoder with that behaviour and
// is a choice of this design.
module si_decoder (
  input  logic [4:0] rx,
  output logic [1:0] idx,
  output logic       corrected,
  output logic       detected
);

  logic [4:0] cws [4];

  for (genvar i = 0; i < 4; i++) begin : g_cw
    si_encoder u_enc (.idx(2'(i)), .cw(cws[i]));
  end

  always_comb begin
    int dmin, d;
    dmin = 6;
    idx  = '0;
    for (int i = 0; i < 4; i++) begin
      d = $countones(rx ^ cws[i]);
      if (d < dmin) begin
        dmin = d;
        idx  = 2'(i);
      end
    end
    corrected = (dmin == 1);
    detected  = (dmin >= 2);
  end

endmodule
