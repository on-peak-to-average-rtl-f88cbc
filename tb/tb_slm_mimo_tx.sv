// End-to-end testbench of slm_mimo_tx at its default size (4 transmit
// chains, 2 encoders); it also serves as the full-size test.
// The run has four phases, one per modulation (BPSK, QPSK, 16-QAM,
// 64-QAM: the mode switch). Each phase starts with init and a new
// scrambler seed, then runs both halves of the transmitter at once:
//  - FEC half: random data bits with random gaps go in; the coded bits of
//    each spatial stream are compared bit for bit with a model of
//    scrambler, round-robin encoder parser, 133/171 encoders and stream
//    parser (blocks of max(1, N_BPSC/2) bits).
//  - Per-antenna half: every antenna gets random bit groups for its 47
//    data subcarriers, with random stalls, starting at different times.
//    For each 80-sample output symbol the checker rebuilds the 64 bins
//    (Gray-mapped points, pilots, empty reserved tones) and verifies
//    against the floating-point IFFT-bank model that the chosen candidate
//    has the lowest PAPR (within 1%), that the codeword matches it, that
//    every sample equals that candidate plus the side-information tones
//    with samples 0..15 repeating samples 48..63, and that the first
//    output sample comes 139 clocks after the chain took the last bin.
// The side-information level cycles through a = 1, 0.7, 0.4 and 0 (off).
// Counted mechanisms: each modulation, each of the four candidates
// chosen, symbols with and without side information, input stalls in the
// middle of a symbol, pairs split between two streams, scrambler
// reseeds, received side-information words decoded clean, corrected and
// flagged (each sent codeword is passed through the receiver's decoder
// with 0, 1 and 2 bit errors); any that never happens counts as a failure.
module tb_slm_mimo_tx;
  import slm_pkg::*;
  import slm_ref_pkg::*;

  localparam int NT = 4, NE = 2, NSYM = 2, NBITS = 600;
  localparam int LEVELS [4] = '{16384, 11469, 6554, 0};
  localparam int PILOT_SC [4] = '{-21, -7, 7, 21};
  localparam int PILOT_V  [4] = '{1, 1, 1, -1};

  logic clk = 0, rst_n = 0;
  mod_t mod = MOD_BPSK;
  smp_t si_level = '0;
  logic init = 0;
  logic [6:0] scr_seed = 7'h7f;
  logic data_valid = 0, data_bit = 0;
  logic [1:0] cs_valid [NT], cs_bits [NT];
  logic sc_valid [NT], sc_ready [NT];
  logic [5:0] sc_bits [NT];
  logic td_valid [NT], td_first [NT];
  cplx_t td_data [NT];
  logic [1:0] td_sel [NT];
  logic [4:0] td_cw [NT];
  logic [4:0] si_rx_cw = '0;
  logic [1:0] si_rx_idx;
  logic si_rx_corrected, si_rx_detected;
  logic [4:0] sent_cw [$];
  int rx_clean = 0, rx_corrected = 0, rx_detected = 0;

  int checks = 0, failures = 0;
  int chosen [4], per_mod [4];
  int with_si = 0, without_si = 0, stalls = 0, split_pairs = 0, reseeds = 0;
  int done_ant = 0;

  slm_mimo_tx dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cycle = 0;
  int lvl_hist [longint];
  always @(posedge clk) begin
    lvl_hist[cycle] = int'(si_level);
    cycle <= cycle + 1;
  end

  // ---------------- per-antenna half ----------------
  typedef struct { sym_t fr; sym_t fi; int lvl; longint t_last; } exp_t;
  exp_t q [NT][$];

  function automatic bit pilot_bin(input int k, output real v);
    for (int p = 0; p < 4; p++)
      if (k == (PILOT_SC[p] + N) % N) begin v = real'(PILOT_V[p]) * 16384.0; return 1'b1; end
    v = 0.0;
    return 1'b0;
  endfunction

  task automatic send(input int a, input int m);
    int nb;
    nb = bits_per_sc(mod_t'(m));
    for (int s = 0; s < NSYM; s++) begin
      exp_t e;
      repeat ($urandom_range(0, 30) + 10 * a) @(posedge clk);
      #1;
      for (int k = 0; k < N; k++) begin
        real pv;
        e.fr[k] = 0.0; e.fi[k] = 0.0;
        if (pilot_bin(k, pv)) e.fr[k] = pv;
        else if (data_bin(k)) begin
          logic [5:0] b;
          b = 6'($urandom) & 6'((1 << nb) - 1);
          ref_point(m, b, e.fr[k], e.fi[k]);
          if (k > 1 && $urandom_range(0, 9) == 0) begin
            sc_valid[a] = 0;
            stalls++;
            repeat ($urandom_range(1, 4)) @(posedge clk);
            #1;
          end
          sc_valid[a] = 1; sc_bits[a] = b;
          while (!sc_ready[a]) begin @(posedge clk); #1; end
          @(posedge clk); #1;
          e.t_last = cycle;
        end
      end
      sc_valid[a] = 0;
      q[a].push_back(e);
    end
  endtask

  task automatic check(input int a, input int m);
    for (int s = 0; s < NSYM; s++) begin
      exp_t e;
      sym_t tr, ti;
      real p [4], pmin;
      int c;
      while (!td_first[a]) begin @(posedge clk); #1; end
      e = q[a].pop_front();
      // the chain registers the level 73 clocks after the last bin
      e.lvl = lvl_hist[e.t_last + 72];
      checks++;
      if (cycle - e.t_last != 139) begin
        failures++; $display("ant %0d sym %0d: latency %0d, expected 139", a, s, cycle - e.t_last);
      end
      for (int i = 0; i < 4; i++) begin
        candidate(i, e.fr, e.fi, tr, ti);
        p[i] = papr(tr, ti);
      end
      pmin = p[0];
      for (int i = 1; i < 4; i++) if (p[i] < pmin) pmin = p[i];
      c = int'(td_sel[a]);
      chosen[c]++;
      per_mod[m]++;
      if (e.lvl != 0) with_si++; else without_si++;
      checks += 2;
      if (p[c] > pmin * 1.01) begin failures++; $display("ant %0d: picked %0d PAPR %f min %f", a, c, p[c], pmin); end
      if (td_cw[a] != REF_CW[c]) begin failures++; $display("ant %0d: cw %b for %0d", a, td_cw[a], c); end
      sent_cw.push_back(td_cw[a]);
      candidate(c, e.fr, e.fi, tr, ti);
      add_si(REF_CW[c], e.lvl, tr, ti);
      for (int i = 0; i < N + GI_LEN; i++) begin
        int n;
        cplx_t g;
        n = (i + N - GI_LEN) % N;
        g = td_data[a];
        checks++;
        if (!td_valid[a] || real'(g.re) - tr[n] > 8.0 || tr[n] - real'(g.re) > 8.0 ||
            real'(g.im) - ti[n] > 8.0 || ti[n] - real'(g.im) > 8.0) begin
          failures++;
          $display("ant %0d sym %0d i %0d: got (%0d,%0d) exp (%f,%f)", a, s, i, g.re, g.im, tr[n], ti[n]);
        end
        @(posedge clk); #1;
      end
    end
    done_ant++;
  endtask

  // ---------------- FEC half ----------------
  bit exp_ss [NT][$];
  bit got_ss [NT][$];
  int fec_done = 0;

  // coded bits as they leave the stream parser
  always @(posedge clk) begin
    for (int s = 0; s < NT; s++)
      for (int b = 0; b < 2; b++)
        if (rst_n && cs_valid[s][b]) got_ss[s].push_back(cs_bits[s][b]);
  end

  task automatic fec_phase(input int m, input logic [6:0] seed);
    logic [6:0] st;
    logic [5:0] prev [NE];
    int sblk, j;
    st = seed;
    for (int e = 0; e < NE; e++) prev[e] = '0;
    sblk = (bits_per_sc(mod_t'(m)) > 1) ? bits_per_sc(mod_t'(m)) / 2 : 1;
    if (sblk % 2 == 1) split_pairs++;
    j = 0;
    for (int i = 0; i < NBITS; i++) begin
      logic d, t, sb;
      logic [6:0] win;
      int e;
      if ($urandom_range(0, 3) == 0) begin
        data_valid = 0;
        repeat ($urandom_range(1, 3)) @(posedge clk);
        #1;
      end
      d = 1'($urandom);
      data_valid = 1; data_bit = d;
      @(posedge clk); #1;
      data_valid = 0;
      // model: scrambler x^7 + x^4 + 1, round robin, 133/171 encoder
      t = st[6] ^ st[3];
      st = {st[5:0], t};
      sb = d ^ t;
      e = i % NE;
      win[6] = sb;
      for (int k = 0; k < 6; k++) win[5 - k] = prev[e][k];
      prev[e] = {prev[e][4:0], sb};
      for (int o = 0; o < 2; o++) begin
        exp_ss[(j / sblk) % NT].push_back(o == 0 ? ^(win & 7'o133) : ^(win & 7'o171));
        j++;
      end
    end
    repeat (5) @(posedge clk);
    #1;
    for (int s = 0; s < NT; s++) begin
      checks++;
      if (got_ss[s].size() != exp_ss[s].size()) begin
        failures++;
        $display("mod %0d stream %0d: %0d coded bits, expected %0d", m, s, got_ss[s].size(), exp_ss[s].size());
      end else
        for (int i = 0; i < exp_ss[s].size(); i++) begin
          checks++;
          if (got_ss[s][i] != exp_ss[s][i]) begin
            failures++;
            if (failures < 20) $display("mod %0d stream %0d bit %0d wrong", m, s, i);
          end
        end
      got_ss[s].delete();
      exp_ss[s].delete();
    end
    fec_done++;
  endtask

  // side-information level changes now and then
  initial begin
    int j;
    j = 0;
    forever begin
      si_level = smp_t'(LEVELS[j % 4]);
      j++;
      repeat (97) @(posedge clk);
    end
  end

  initial begin
    for (int a = 0; a < NT; a++) begin sc_valid[a] = 0; sc_bits[a] = '0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int m = 0; m < 4; m++) begin
      logic [6:0] seed;
      // mode switch between packets, with the transmitter idle
      repeat (2) @(posedge clk);
      #1;
      mod = mod_t'(m);
      seed = 7'($urandom_range(1, 127));
      scr_seed = seed;
      init = 1;
      reseeds++;
      @(posedge clk); #1;
      init = 0;
      done_ant = 0;
      fec_done = 0;
      for (int a = 0; a < NT; a++) begin
        automatic int aa = a;
        automatic int mm = m;
        fork
          send(aa, mm);
          check(aa, mm);
        join_none
      end
      fork
        fec_phase(m, seed);
      join_none
      wait (done_ant == NT && fec_done == 1);
    end
    // receiver side: every sent codeword with 0, 1 or 2 bit errors,
    // against a nearest-codeword search over the four codewords
    foreach (sent_cw[i]) begin
      for (int ne = 0; ne < 3; ne++) begin
        logic [4:0] w;
        int dmin, best, p1, p2;
        w = sent_cw[i];
        p1 = $urandom_range(0, 4);
        p2 = (p1 + $urandom_range(1, 4)) % 5;
        if (ne >= 1) w[p1] = ~w[p1];
        if (ne == 2) w[p2] = ~w[p2];
        dmin = 6; best = 0;
        for (int c = 0; c < 4; c++)
          if ($countones(w ^ REF_CW[c]) < dmin) begin dmin = $countones(w ^ REF_CW[c]); best = c; end
        si_rx_cw = w;
        #1;
        checks++;
        if (si_rx_corrected != (dmin == 1) || si_rx_detected != (dmin >= 2) ||
            (dmin < 2 && int'(si_rx_idx) != best)) begin
          failures++;
          $display("SI decoder: word %b gave idx %0d corr %b det %b", w, si_rx_idx, si_rx_corrected, si_rx_detected);
        end
        if (dmin == 0) rx_clean++; else if (dmin == 1) rx_corrected++; else rx_detected++;
      end
    end
    checks += 9;
    if (rx_clean == 0 || rx_corrected == 0 || rx_detected == 0) begin failures++; $display("SI decoder case missing"); end
    for (int i = 0; i < 4; i++) begin
      if (chosen[i] == 0) begin failures++; $display("candidate %0d never chosen", i); end
      if (per_mod[i] == 0) begin failures++; $display("modulation %0d never sent", i); end
    end
    checks += 2;
    if (with_si == 0 || without_si == 0) begin failures++; $display("SI on %0d off %0d", with_si, without_si); end
    if (stalls == 0 || split_pairs == 0 || reseeds < 2) begin failures++; $display("no stalls, split pairs or reseeds"); end
    $display("symbols per modulation %0d %0d %0d %0d; chosen %0d %0d %0d %0d; SI on %0d off %0d",
             per_mod[0], per_mod[1], per_mod[2], per_mod[3], chosen[0], chosen[1], chosen[2], chosen[3],
             with_si, without_si);
    $display("SI words decoded clean %0d, corrected %0d, flagged %0d", rx_clean, rx_corrected, rx_detected);
    $display("input stalls %0d; phases with split pairs %0d; scrambler reseeds %0d", stalls, split_pairs, reseeds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
