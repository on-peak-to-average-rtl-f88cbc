// 802.11n-style MIMO-OFDM transmitter with low-complexity SLM
// (selected-mapping) PAPR reduction on every transmit antenna.
//
// Two halves, joined outside this module by the bit interleaver:
//  - FEC half: data bits -> scrambler -> encoder parser (round robin over
//    N_ES encoders) -> rate-1/2 convolutional encoders -> stream parser ->
//    coded bits of N_SS = N_TX spatial streams (cs_valid / cs_bits).
//  - Per-antenna half (direct spatial mapping: stream a drives antenna a):
//    interleaved bits of one subcarrier (sc_bits) -> QAM mapping -> pilot
//    insertion and subcarrier placement -> SLM chain (one IFFT, three
//    conversion matrices, minimum-PAPR choice, coded side information on
//    five reserved tones) -> 16-sample guard interval -> 80 samples per
//    symbol on td_data, with the chosen index and codeword on td_sel/td_cw.
// Each antenna picks its own candidate, so the PAPR hardware added per
// antenna is a few adders per sample instead of three more IFFTs.
//
// Timing per antenna: 47 data subcarriers per symbol are taken on
// sc_valid/sc_ready while the chain loads (at most one per clock); the
// first guard-interval sample appears 139 clocks after the chain has taken
// the last of the 64 bins; a chain handles one symbol per 203 clocks when
// fed at full rate. The FEC half takes one data bit per clock.
// mod selects BPSK/QPSK/16-QAM/64-QAM for the mapper and the stream parser
// and may only change between packets (with init) when the chains are idle.
// The receiver's side-information decoder stands beside the transmitter
// with its own ports (si_rx_*): it maps a hard-decided 5-bit word back to
// the candidate index, correcting one bit error.
// N_TX = 4 and N_ES = 2 are the largest 20 MHz configuration in the
// 802.11n rate tables. The interleaver, cyclic shift insertion, space-time
// block coding and spatial expansion are not part of this design.
module slm_mimo_tx
  import slm_pkg::*;
#(
  parameter int N_TX = 4,
  parameter int N_ES = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mod_t        mod,
  input  smp_t        si_level,
  // FEC half
  input  logic        init,
  input  logic [6:0]  scr_seed,
  input  logic        data_valid,
  input  logic        data_bit,
  output logic [1:0]  cs_valid [N_TX],
  output logic [1:0]  cs_bits  [N_TX],
  // interleaved bits of one data subcarrier per antenna (bits[0] first)
  input  logic        sc_valid [N_TX],
  output logic        sc_ready [N_TX],
  input  logic [5:0]  sc_bits  [N_TX],
  // time-domain symbols with guard interval
  output logic        td_valid [N_TX],
  output logic        td_first [N_TX],
  output cplx_t       td_data  [N_TX],
  output logic [1:0]  td_sel   [N_TX],
  output logic [4:0]  td_cw    [N_TX],
  // receiver side: decoding of a received side-information word
  input  logic [4:0]  si_rx_cw,
  output logic [1:0]  si_rx_idx,
  output logic        si_rx_corrected,
  output logic        si_rx_detected
);

  // ---------------- FEC half ----------------
  logic        scr_valid, scr_bit;
  logic        ep_valid [N_ES], ep_bit [N_ES];
  logic        enc_valid [N_ES], enc_a [N_ES], enc_b [N_ES];
  logic        pair_valid;
  logic [1:0]  pair_bits;

  scrambler u_scr (
    .clk, .rst_n, .init, .seed(scr_seed),
    .in_valid(data_valid), .in_bit(data_bit),
    .out_valid(scr_valid), .out_bit(scr_bit)
  );

  encoder_parser #(.N_ES(N_ES)) u_ep (
    .clk, .rst_n, .init,
    .in_valid(scr_valid), .in_bit(scr_bit),
    .out_valid(ep_valid), .out_bit(ep_bit)
  );

  for (genvar e = 0; e < N_ES; e++) begin : g_fec
    conv_encoder u_enc (
      .clk, .rst_n, .init,
      .in_valid(ep_valid[e]), .in_bit(ep_bit[e]),
      .out_valid(enc_valid[e]), .out_a(enc_a[e]), .out_b(enc_b[e])
    );
  end

  // At most one encoder produces a pair per clock.
  always_comb begin
    pair_valid = 1'b0;
    pair_bits  = '0;
    for (int e = 0; e < N_ES; e++)
      if (enc_valid[e]) begin
        pair_valid = 1'b1;
        pair_bits  = {enc_b[e], enc_a[e]};
      end
  end

  stream_parser #(.N_SS(N_TX)) u_sp (
    .clk, .rst_n, .init, .mod,
    .in_valid(pair_valid), .in_bits(pair_bits),
    .out_valid(cs_valid), .out_bits(cs_bits)
  );

  // ---------------- per-antenna half ----------------
  for (genvar a = 0; a < N_TX; a++) begin : g_tx
    cplx_t       point;
    logic        fd_valid, fd_ready, fd_first;
    logic [LOG2N-1:0] fd_cnt;
    cplx_t       fd_data;
    logic        o_valid, o_first;
    cplx_t       o_data;
    logic [1:0]  o_sel;
    logic [4:0]  o_cw;

    qam_mapper u_map (.mod, .bits(sc_bits[a]), .point);

    pilot_insert u_pil (
      .clk, .rst_n,
      .dp_valid(sc_valid[a]), .dp_ready(sc_ready[a]), .dp_point(point),
      .out_valid(fd_valid), .out_ready(fd_ready), .out_data(fd_data),
      .out_first(fd_first)
    );

    slm_tx_chain u_slm (
      .clk, .rst_n,
      .in_valid(fd_valid), .in_ready(fd_ready), .in_data(fd_data),
      .si_level,
      .out_valid(o_valid), .out_first(o_first), .out_data(o_data),
      .out_sel(o_sel), .out_cw(o_cw)
    );

    gi_insert u_gi (
      .clk, .rst_n,
      .in_valid(o_valid), .in_first(o_first), .in_data(o_data),
      .out_valid(td_valid[a]), .out_first(td_first[a]), .out_data(td_data[a])
    );

    // Bins handed to the chain; the placer's first bin must be bin 0.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                     fd_cnt <= '0;
      else if (fd_valid && fd_ready)  fd_cnt <= fd_cnt + 1'b1;
    end

    assert property (@(posedge clk) disable iff (!rst_n)
                     fd_valid |-> (fd_first == (fd_cnt == '0)));

    // Hold the selection of the symbol now passing through gi_insert.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        td_sel[a] <= '0;
        td_cw[a]  <= '0;
      end else if (o_first) begin
        td_sel[a] <= o_sel;
        td_cw[a]  <= o_cw;
      end
    end

  end

  // ---------------- side-information decoder (receiver) ----------------
  si_decoder u_si_rx (
    .rx(si_rx_cw), .idx(si_rx_idx),
    .corrected(si_rx_corrected), .detected(si_rx_detected)
  );

  // The encoder parser feeds one encoder per clock.
  logic [N_ES-1:0] enc_valid_v;
  always_comb for (int e = 0; e < N_ES; e++) enc_valid_v[e] = enc_valid[e];
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(enc_valid_v));

endmodule
