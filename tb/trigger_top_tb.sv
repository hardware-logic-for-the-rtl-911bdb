// trigger_top_tb: end-to-end run of the whole trigger system at its default
// size (120 + 120 wires, 260 stripes, 128-word buffer).
//
// Events are generated from straight tracks: a track from source step ts
// (source on an inner stripe centre) with theta interval j and azimuth wire
// w fires inner wire w, outer wire w (+-1), inner stripe ts+j and the outer
// stripe under the point 1.5*j stripes from the source, in the half-circle
// of its azimuth, on a random cathode.  Event kinds:
//   COLL   collinear beam-beam pair from the scanned region  -> read out
//   MULTI  three tracks from one source                     -> read out
//   SINGLE one track                                        -> fast reject
//   SHOWER ten tracks in one sector (too many)              -> fast reject
//   COSMIC back-to-back in phi, stripes not from the axis   -> decision reject
//   GAS    back-to-back in phi, source outside the chambers -> decision reject
//   NOGATE a good event outside the machine gate            -> no pre-trigger
//   PILEUP a second event while the first is busy           -> lost, counted
// Before the events, the two side-by-side example circuits are exercised:
// the three-chamber telescopes (with and without scintillator), the flat-
// chamber telescopes (inside and just outside a b group) and the
// plane-chamber scanner (a point found by scanning, and again after
// translation steps).
// A slow computer reads the buffer so that the read-out has to wait.  Every
// record read back is compared word by word with the event that produced it;
// the dead time of a fast reject is checked against half a microsecond
// (5 clocks of 100 ns).  Each mechanism must occur at least once.
module trigger_top_tb;
  import trig_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [N_WIRES-1:0]   wire_in;
  logic [N_STRIPES-1:0] stripe_in;
  logic counter_in, machine_gate;
  ctrl_t ctrl;
  logic busy, pretrigger, any_track, main_trigger, reject, collinear, start_readout, end_busy;
  logic [23:0] pretrig_count, lost_count;
  logic [TRK_W-1:0] track_count;
  logic [TZC_W-1:0] tz_count;
  logic [7:0] pattern_count [4];
  logic [TRK_W-1:0] wire_count [2];
  logic [TRK_W-1:0] sym_count;
  logic rd_en, rd_valid;
  logic [WORD_W-1:0] rd_data;
  logic [N_PHI-1:0] ex3_d;
  logic ex3_s = 0;
  logic [N_PHI-1:0] ex3_a = '0, ex3_b = '0, ex3_c = '0;
  logic [95:0] exf_a = '0;
  logic [97:0] exf_b = '0;
  logic [47:0] exf_d;
  logic exz_load = 0, exz_scan = 0, exz_trans = 0;
  logic [15:0] exz_wires = '0;
  logic [20:0] exz_left = '0, exz_right = '0;
  logic exz_active;
  logic [4:0] exz_idx, exz_off;
  logic [5:0] exz_z;
  logic exz_valid, exz_multi;
  logic [2:0] exz_num;

  always #50 clk = ~clk;   // 100 ns step clock

  trigger_top dut (
    .clk, .rst_n, .wire_in, .stripe_in, .counter_in, .machine_gate, .ctrl,
    .busy, .pretrigger, .any_track, .pretrig_count, .lost_count, .main_trigger, .reject,
    .track_count, .collinear, .tz_count, .pattern_count, .wire_count, .sym_count, .start_readout, .end_busy,
    .rd_en, .rd_data, .rd_valid,
    .ex3_s, .ex3_a, .ex3_b, .ex3_c, .ex3_d, .exf_a, .exf_b, .exf_d,
    .exz_load, .exz_wires, .exz_left, .exz_right, .exz_scan, .exz_trans,
    .exz_active, .exz_idx, .exz_off, .exz_z, .exz_valid, .exz_num, .exz_multi);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_pretrig = 0, n_main = 0, n_fast_rej = 0, n_dec_rej = 0, n_accept = 0;
  int n_lost = 0, n_stall = 0, n_nogate = 0;
  int n_shower = 0, n_flat = 0, n_ex3 = 0, n_zscan = 0, n_ztrans = 0, n_wcount = 0, n_sym = 0;

  // orientations s at which both half circles [s, s+60) and [s+60, s+120)
  // hold a straight direction of the stored event
  function automatic int sym_model();
    logic [N_PHI-1:0] ri, ro;
    int m;
    ri = dut.wire_mem[N_PHI-1:0]; ro = dut.wire_mem[N_WIRES-1:N_PHI];
    m = 0;
    for (int s = 0; s < N_PHI; s++) begin
      bit h [2];
      h[0] = 0; h[1] = 0;
      for (int k = 0; k < N_PHI; k++) begin
        int p;
        p = (s + k) % N_PHI;
        if (ri[p] & (ro[(p + N_PHI - 1) % N_PHI] | ro[p] | ro[(p + 1) % N_PHI])) h[k / (N_PHI / 2)] = 1;
      end
      m += int'(h[0] & h[1]);
    end
    return m;
  endfunction

  // at the end of every turn the fired-wire counts of the rotation must equal
  // the number of wires stored for the event
  always @(posedge clk) if (rst_n && (start_readout || dut.dec_reject)) begin
    checks++;
    if (int'(wire_count[0]) != $countones(dut.wire_mem[N_PHI-1:0]) ||
        int'(wire_count[1]) != $countones(dut.wire_mem[N_WIRES-1:N_PHI]))
      fail($sformatf("wire counts %0d/%0d", wire_count[0], wire_count[1]));
    else n_wcount++;
    checks++;
    if (int'(sym_count) != sym_model()) fail($sformatf("symmetry count %0d, expected %0d", sym_count, sym_model()));
    else if (int'(sym_count) == N_PHI) n_sym++;
  end

  // expected read-out records, in order
  logic [WORD_W-1:0] exp_q [$];
  int words_read = 0;

  task automatic fail(input string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  // --------------------------------------------------------------- watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // --------------------------------------------------------------- computer
  bit slow_reader = 1;
  always @(negedge clk) begin
    rd_en <= 1'b0;
    if (rst_n && rd_valid && ($urandom_range(0, slow_reader ? 15 : 1) == 0)) begin
      rd_en <= 1'b1;
      checks++;
      if (exp_q.size() == 0) fail($sformatf("unexpected word %h", rd_data));
      else begin
        logic [WORD_W-1:0] e;
        e = exp_q.pop_front();
        if (rd_data !== e) fail($sformatf("read-out word %0d = %h, expected %h", words_read, rd_data, e));
      end
      words_read++;
    end
  end
  always @(posedge clk) if (dut.u_ro.wr_en && dut.u_fifo.full) n_stall++;

  // ------------------------------------------------------------- event build
  logic [N_WIRES-1:0]   ev_w;
  logic [N_STRIPES-1:0] ev_s;

  function automatic int half_of(input int w);
    return (w < N_PHI / 2) ? 0 : 1;
  endfunction

  // straight track from source step ts with theta interval j at azimuth w
  task automatic add_track(input int w, input int ts, input int j);
    int h, zi, zo_mm, zo;
    ev_w[w] = 1;
    ev_w[N_PHI + ((w + $urandom_range(0, 2) - 1 + N_PHI) % N_PHI)] = 1;
    h  = half_of(w);
    zi = ts + j;
    zo_mm = (2 * ts + 1) * 10 - 250 + 30 * j + 400;
    zo = zo_mm / 20;
    if (zi >= 0 && zi < int'(NZ_IN))
      ev_s[stripe_index(0, $urandom_range(0, 1), h, zi)] = 1;
    if (zo_mm >= 0 && zo < int'(NZ_OUT))
      ev_s[stripe_index(1, $urandom_range(0, 1), h, zo)] = 1;
  endtask

  // stripes placed directly (inner a, outer b) for tracks not from the axis
  task automatic add_raw(input int w, input int a, input int b);
    int h;
    ev_w[w] = 1;
    ev_w[N_PHI + w] = 1;
    h = half_of(w);
    ev_s[stripe_index(0, 0, h, a)] = 1;
    ev_s[stripe_index(1, 1, h, b)] = 1;
  endtask

  // --------------------------------------------------------------- one event
  // outcome: 0 none, 1 fast reject, 2 decision reject, 3 read out
  task automatic run_event(input string kind, input int expect_outcome, input bit gate,
                           input int exp_z, input int exp_tracks, input bit pileup);
    int t, t_pt, t_clear, outcome, tz_z_seen;
    @(negedge clk);
    wire_in = ev_w; stripe_in = ev_s; counter_in = 1; machine_gate = gate;
    // expected record if read out: header words are checked from the event
    outcome = 0; t_pt = -1; t_clear = -1;
    for (t = 0; t < 2000; t++) begin
      @(posedge clk); #1;
      if (pretrigger) begin t_pt = t; n_pretrig++; end
      if (t == 3) begin wire_in = '0; stripe_in = '0; counter_in = 0; end
      if (pileup && t == 6) begin wire_in = ev_w; counter_in = 1; end
      if (pileup && t == 9) begin wire_in = '0; counter_in = 0; end
      if (main_trigger) n_main++;
      if (reject && dut.trk_reject) begin outcome = 1; n_fast_rej++; end
      if (reject && dut.dec_reject) begin outcome = 2; n_dec_rej++; end
      if (start_readout) begin
        outcome = 3; n_accept++;
        checks++;
        if (int'(dut.tz_z) != exp_z) fail($sformatf("%s: origin step %0d, expected %0d", kind, dut.tz_z, exp_z));
        checks++;
        if (int'(track_count) != exp_tracks) fail($sformatf("%s: %0d tracks, expected %0d", kind, track_count, exp_tracks));
        checks++;
        if (kind == "COLL" && pattern_count[3] == 0) fail("collinear pattern not found in the turn");
      end
      if (t_pt >= 0 && !busy && t_clear < 0) t_clear = t;
      if (t > 12 && !busy && t_clear >= 0) break;
      if (t > 12 && t_pt < 0) break;
    end
    if (!gate) n_nogate++;
    checks++;
    if (outcome != expect_outcome) fail($sformatf("%s: outcome %0d, expected %0d", kind, outcome, expect_outcome));
    if (outcome == 1) begin
      checks++;   // dead time of a fast reject: busy from pre-trigger to clear
      if (t_clear - t_pt > 5) fail($sformatf("%s: dead time %0d clocks", kind, t_clear - t_pt));
    end
  endtask

  // independent model of the theta-z scan, in millimetres: source step t
  // (0 .. NZ_IN-1), interval j, half h fires when inner stripe t+j is hit on
  // either cathode and an outer stripe centre lies within one pitch of the
  // outer crossing point.  Returns the saturated count and the first hit.
  task automatic tz_model(output int cnt, output int fz, output int fth, output int fh);
    bit found;
    cnt = 0; found = 0; fz = 0; fth = 0; fh = 0;
    for (int t = 0; t < int'(NZ_IN); t++)
      for (int h = 0; h < 2; h++)
        for (int j = -THETA_JMAX; j <= THETA_JMAX; j++) begin
          bit in_hit, out_hit;
          int pos;
          in_hit = 0; out_hit = 0;
          if (t + j >= 0 && t + j < int'(NZ_IN))
            in_hit = ev_s[stripe_index(0, 0, h, t + j)] | ev_s[stripe_index(0, 1, h, t + j)];
          pos = (2 * t + 1) * 10 - 250 + 30 * j + 400;
          for (int k = 0; k < int'(NZ_OUT); k++)
            if ((ev_s[stripe_index(1, 0, h, k)] | ev_s[stripe_index(1, 1, h, k)])
                && (20 * k + 10 - pos < 20) && (pos - 20 * k - 10 < 20)) out_hit = 1;
          if (in_hit && out_hit) begin
            if (cnt < 15) cnt++;
            if (!found) begin found = 1; fz = t; fth = j + THETA_JMAX; fh = h; end
          end
        end
  endtask

  // build the expected read-out record of the event in ev_w / ev_s
  task automatic expect_record(input int evno, input int ntr, input int tzc, input int z, input int th, input int hf);
    logic [ceil_div(N_WIRES, WORD_W)*WORD_W-1:0]   wp;
    logic [ceil_div(N_STRIPES, WORD_W)*WORD_W-1:0] sp;
    wp = $bits(wp)'(ev_w);
    sp = $bits(sp)'(ev_s);
    exp_q.push_back({4'hE, 12'(evno)});
    exp_q.push_back(WORD_W'(ntr));
    exp_q.push_back({4'(tzc), 1'b1, 1'(hf), 5'(z), 5'(th)});
    for (int k = 0; k < int'(ceil_div(N_WIRES, WORD_W)); k++) exp_q.push_back(wp[k*WORD_W +: WORD_W]);
    for (int k = 0; k < int'(ceil_div(N_STRIPES, WORD_W)); k++) exp_q.push_back(sp[k*WORD_W +: WORD_W]);
  endtask


  // ------------------------------------------------- side-by-side examples
  // Three-chamber telescope: a track along direction w must fire d[w] only
  // with the scintillator.  Plane-chamber scanner: one crossing point at
  // (wire pw, distance pz), found by scanning, then found again pz-t after
  // t translation steps.
  task automatic run_examples();
    for (int n = 0; n < 4; n++) begin
      int w, pw, pz, t, seen;
      w = $urandom_range(1, N_PHI - 2);
      ex3_a = '0; ex3_b = '0; ex3_c = '0;
      ex3_a[w] = 1; ex3_b[w + 1] = 1; ex3_c[w - 1] = 1;
      ex3_s = 0;
      @(negedge clk);
      checks++;
      if (ex3_d != '0) fail("three-chamber telescope fired without scintillator");
      ex3_s = 1;
      @(negedge clk);
      checks++;
      if (ex3_d != (N_PHI'(1) << w)) fail($sformatf("three-chamber telescope: d=%h for w=%0d", ex3_d, w));
      else n_ex3++;
      ex3_s = 0;

      // flat chambers: a wire 2i+1 with b wire 2i+2 is telescope i; b wire
      // 2i+3 belongs only to telescope i+1
      begin
        int i;
        i = $urandom_range(0, 46);
        exf_a = '0; exf_b = '0;
        exf_a[2 * i + 1] = 1; exf_b[2 * i + 3] = 1;
        @(negedge clk);
        checks++;
        if (exf_d != (48'(1) << i)) fail($sformatf("flat telescopes: d=%h for i=%0d", exf_d, i));
        else n_flat++;
        exf_b = '0; exf_b[2 * i + 4] = 1;
        @(negedge clk);
        checks++;
        if (exf_d != '0) fail($sformatf("flat telescopes fired outside the b group, i=%0d", i));
      end

      pw = $urandom_range(0, 15); pz = $urandom_range(2, 5);
      for (int tr = 0; tr < 2; tr++) begin
        t = tr ? $urandom_range(1, pz) : 0;
        exz_wires = '0; exz_left = '0; exz_right = '0;
        exz_wires[pw] = 1; exz_left[pw - pz + 5] = 1; exz_right[pw + pz] = 1;
        exz_load = 1; @(negedge clk); exz_load = 0;
        repeat (t) begin exz_trans = 1; @(negedge clk); exz_trans = 0; end
        seen = -1;
        for (int s = 0; s < 16; s++) begin
          if (exz_valid) begin
            checks++;
            if (seen >= 0 || int'(exz_idx) != pw || int'(exz_num) != pz - t || int'(exz_off) != t || !exz_active)
              fail($sformatf("scanner: idx %0d z %0d off %0d, expected wire %0d z %0d", exz_idx, exz_num, exz_off, pw, pz - t));
            else if (t == 0) n_zscan++;
            else n_ztrans++;
            seen = s;
          end
          exz_scan = 1; @(negedge clk); exz_scan = 0;
        end
        checks++;
        if (seen < 0) fail($sformatf("scanner missed wire %0d z %0d after %0d translations", pw, pz, t));
      end
    end
  endtask

  // ------------------------------------------------------------------ main
  initial begin
    int evno, lost0;
    wire_in = '0; stripe_in = '0; counter_in = 0; machine_gate = 0; rd_en = 0;
    ctrl = '0;
    ctrl.acc_ctrl    = 7'b0011100;     // outer wire -1 .. +1
    ctrl.trk_min     = 2;
    ctrl.trk_max     = 6;
    ctrl.dec_trk_min = 2;
    ctrl.phi_sel     = '1;
    ctrl.use_phi     = 1;
    ctrl.use_copl    = 0;
    ctrl.theta_sel   = '1;
    ctrl.tz_min      = 2;
    ctrl.use_tz      = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    evno = 0;
    run_examples();

    for (int round = 0; round < 6; round++) begin
      int ts, j, w, nacc;
      // collinear beam-beam pair: source step ts, angles j and -j, azimuth w and w+60
      ts = $urandom_range(3, 21); j = $urandom_range(1, 3); w = $urandom_range(5, 50);
      ev_w = '0; ev_s = '0;
      add_track(w, ts, j); add_track(w + N_PHI / 2, ts, -j);
      begin
        int c, fz, fth, fh;
        tz_model(c, fz, fth, fh);
        checks++;   // the true origin lies within two steps of the first hit
        if (ts - fz > 2 || fz > ts) fail($sformatf("model: origin %0d found at %0d", ts, fz));
        expect_record(evno, 2, c, fz, fth, fh);
        run_event("COLL", 3, 1, fz, 2, 0); evno++;
      end

      // multibody: three tracks from one source
      ts = $urandom_range(4, 20); w = $urandom_range(2, 25);
      ev_w = '0; ev_s = '0;
      add_track(w, ts, 2); add_track(w + 40, ts, -1); add_track(w + 80, ts, 1);
      begin
        int c, fz, fth, fh;
        tz_model(c, fz, fth, fh);
        checks++;   // several tracks also pair up falsely: only ask for >= 3 hits
        if (c < 3) fail($sformatf("model: multibody event gives %0d hits", c));
        expect_record(evno, 3, c, fz, fth, fh);
        run_event("MULTI", 3, 1, fz, 3, 0); evno++;
      end

      // single track
      ev_w = '0; ev_s = '0;
      add_track($urandom_range(0, N_PHI - 1), 12, 0);
      run_event("SINGLE", 1, 1, 0, 1, 0);

      // shower from the beam pipe: ten tracks fanning through one sector,
      // more than the main-trigger window allows
      begin
        int w0, nf0;
        ev_w = '0; ev_s = '0;
        w0 = $urandom_range(0, N_PHI - 1);
        for (int k = 0; k < 10; k++) begin
          ev_w[(w0 + 3 * k) % N_PHI] = 1;
          ev_w[N_PHI + (w0 + 3 * k + (k % 3) - 1 + N_PHI) % N_PHI] = 1;
          ev_s[stripe_index(k % 2, 0, half_of((w0 + 3 * k) % N_PHI), 24 - k / 2)] = 1;
        end
        nf0 = n_fast_rej;
        run_event("SHOWER", 1, 1, 0, 10, 0);
        if (n_fast_rej > nf0) n_shower++;
      end

      // cosmic ray: back to back in phi, stripe pairs that no telescope joins
      ev_w = '0; ev_s = '0;
      w = $urandom_range(3, 55);
      add_raw(w, 12, 35); add_raw(w + N_PHI / 2, 13, 2);
      begin
        int c, fz, fth, fh;
        tz_model(c, fz, fth, fh);
        checks++;
        if (c != 0) fail("model: cosmic stripes join a telescope");
      end
      run_event("COSMIC", 2, 1, 0, 2, 0);

      // beam-gas: source far outside the inner chamber
      ev_w = '0; ev_s = '0;
      w = $urandom_range(3, 55);
      add_raw(w, 2, 17); add_raw(w + N_PHI / 2, 1, 16);
      run_event("GAS", 2, 1, 0, 2, 0);

      // good event outside the machine gate
      ev_w = '0; ev_s = '0;
      add_track(20, 10, 1); add_track(80, 10, -1);
      run_event("NOGATE", 0, 0, 0, 2, 0);

      // pile-up: a second event arrives while the first is being rejected
      ev_w = '0; ev_s = '0;
      add_raw(10, 12, 35); add_raw(70, 13, 2);
      lost0 = int'(lost_count);
      run_event("PILEUP", 2, 1, 0, 2, 1);
      checks++;
      if (int'(lost_count) != lost0 + 1) fail("pile-up event not counted as lost");
      else n_lost++;
    end

    // let the computer empty the buffer
    slow_reader = 0;
    repeat (2000) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) fail($sformatf("%0d read-out words never arrived", exp_q.size()));
    checks++;
    if (int'(pretrig_count) != n_pretrig) fail("pre-trigger scaler disagrees");

    $display("mechanisms: pretrigger=%0d main=%0d fast_reject=%0d decision_reject=%0d readout=%0d lost=%0d stall=%0d nogate=%0d shower=%0d three_chamber=%0d flat=%0d z_scan=%0d z_translate=%0d wire_count=%0d balanced=%0d",
             n_pretrig, n_main, n_fast_rej, n_dec_rej, n_accept, n_lost, n_stall, n_nogate, n_shower, n_ex3, n_flat, n_zscan, n_ztrans, n_wcount, n_sym);
    if (n_pretrig == 0) fail("no pre-trigger");
    if (n_main == 0) fail("no main trigger");
    if (n_fast_rej == 0) fail("no fast reject");
    if (n_dec_rej == 0) fail("no decision reject");
    if (n_accept == 0) fail("no read-out");
    if (n_lost == 0) fail("no event lost while busy");
    if (n_stall == 0) fail("read-out never waited on a full buffer");
    if (n_nogate == 0) fail("machine gate never closed");
    if (n_wcount == 0) fail("fired wires never counted");
    if (n_sym == 0) fail("no event balanced at every orientation");
    if (n_ex3 == 0) fail("three-chamber telescope never fired");
    if (n_shower == 0) fail("no shower rejected for too many tracks");
    if (n_flat == 0) fail("flat-chamber telescope never fired");
    if (n_zscan == 0) fail("scanner never found a point");
    if (n_ztrans == 0) fail("scanner never found a translated point");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
