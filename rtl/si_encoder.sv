// Side-information encoder: the 2-bit index of the chosen SLM candidate
// (log2 M bits for M = 4) is protected by a (5,2) shortened Hamming code
// before it is sent on five BPSK tones.
//
// The code is derived from the systematic (7,4) Hamming generator
//   G = [1101000; 0110100; 1110010; 1010001]
// by shortening: the first two message bits are fixed at zero, so rows 0
// and 1 drop out and the two code positions that would carry them
// (columns 3 and 4) are always zero and are deleted. Message bit idx[0]
// selects row 2 and idx[1] row 3, giving the codewords
//   00 -> 00000, 01 -> 11110, 10 -> 10101, 11 -> 01011
// (listed as cw[0..4]). The minimum distance is 3. Purely combinational.
// The generator matrix and the (5,2) code follow the thesis; which two
// message bits are shortened and the bit order are choices of this design.
module si_encoder (
  input  logic [1:0] idx,
  output logic [4:0] cw
);

  // G[r] holds row r, column c at bit c.
  localparam logic [6:0] G [4] = '{7'b0001011, 7'b0010110, 7'b0100111, 7'b1000101};
  // Code positions kept after shortening.
  localparam int KEEP [5] = '{0, 1, 2, 5, 6};

  always_comb begin
    logic [6:0] full;
    full = ({7{idx[0]}} & G[2]) ^ ({7{idx[1]}} & G[3]);
    for (int b = 0; b < 5; b++) cw[b] = full[KEEP[b]];
  end

endmodule
