// trigger_rates_tb: runs the complete trigger system (default size, 100 ns
// clock) at the event rates it is meant for and measures dead time and loss.
//
// Events arrive at random clocks (a fixed probability per clock, at least one
// quiet clock between two arrivals), each as a one-clock pattern of wire hits
// with the counter and the machine gate on:
//   phase A  single tracks at 1e5 per second (p = 0.01 per clock).  Every one
//            gives a pre-trigger and a fast reject.  The busy time of each
//            reject must be at most half a microsecond (5 clocks), and the
//            fraction of arrivals lost while busy must stay under 5 %.
//   phase B  two-track events at 1e4 per second (p = 0.001).  Every one gives
//            a main trigger, a full turn of the sequential logic and a
//            decision reject (theta-z acceptance set out of reach).  The
//            busy time per event must stay within 100 us (1000 clocks).
//   phase C  two-track events at 1e2 per second (p = 1e-4), all accepted.
//            A slow computer reads one word every 8 clocks; every record
//            must arrive complete (35 words each) and the buffer must never
//            overflow.
// The measured loss fractions and busy times are printed.  Each of: fast
// reject, decision reject, read-out and an arrival lost while busy must
// happen.  A watchdog ends a hung run.
module trigger_rates_tb;
  import trig_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [N_WIRES-1:0]   wire_in = '0;
  logic [N_STRIPES-1:0] stripe_in = '0;
  logic counter_in = 0, machine_gate = 0;
  ctrl_t ctrl;
  logic busy, pretrigger, any_track, main_trigger, reject, collinear, start_readout, end_busy;
  logic [23:0] pretrig_count, lost_count;
  logic [TRK_W-1:0] track_count;
  logic [TZC_W-1:0] tz_count;
  logic [7:0] pattern_count [4];
  logic [TRK_W-1:0] wire_count [2];
  logic [TRK_W-1:0] sym_count;
  logic rd_en = 0, rd_valid;
  logic [WORD_W-1:0] rd_data;
  logic [N_PHI-1:0] ex3_d;
  logic [47:0] exf_d;
  logic exz_active, exz_valid, exz_multi;
  logic [4:0] exz_idx, exz_off;
  logic [5:0] exz_z;
  logic [2:0] exz_num;

  always #50 clk = ~clk;

  trigger_top dut (
    .clk, .rst_n, .wire_in, .stripe_in, .counter_in, .machine_gate, .ctrl,
    .busy, .pretrigger, .any_track, .pretrig_count, .lost_count, .main_trigger, .reject,
    .track_count, .collinear, .tz_count, .pattern_count, .wire_count, .sym_count,
    .start_readout, .end_busy, .rd_en, .rd_data, .rd_valid,
    .ex3_s(1'b0), .ex3_a('0), .ex3_b('0), .ex3_c('0), .ex3_d,
    .exf_a('0), .exf_b('0), .exf_d,
    .exz_load(1'b0), .exz_wires('0), .exz_left('0), .exz_right('0), .exz_scan(1'b0),
    .exz_trans(1'b0), .exz_active, .exz_idx, .exz_off, .exz_z, .exz_valid, .exz_num,
    .exz_multi);

  int checks = 0, failures = 0;
  int n_fast = 0, n_dec = 0, n_ro = 0, words = 0;
  int busy_start = 0, max_busy = 0, cyc = 0;
  bit reading = 0;

  task automatic fail(input string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // busy-time measurement and outcome counting
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (pretrigger) busy_start <= cyc;
    if (reject || end_busy) begin
      if (cyc - busy_start + 1 > max_busy) max_busy <= cyc - busy_start + 1;
    end
    if (reject && !main_trigger && dut.trk_reject) n_fast <= n_fast + 1;
    if (dut.dec_reject) n_dec <= n_dec + 1;
    if (end_busy) n_ro <= n_ro + 1;
  end

  // slow computer: one word every 8 clocks while reading is enabled
  always @(posedge clk) begin
    rd_en <= 1'b0;
    if (reading && rd_valid && !rd_en && (cyc % 8 == 0)) begin
      rd_en <= 1'b1;
      words <= words + 1;
    end
  end

  // one event: wire pattern for a single clock
  task automatic event_pulse(input bit pair);
    int w;
    w = $urandom_range(0, N_PHI / 2 - 1);
    wire_in = '0;
    wire_in[w] = 1'b1; wire_in[N_PHI + w] = 1'b1;
    if (pair) begin
      wire_in[w + N_PHI / 2] = 1'b1; wire_in[N_PHI + w + N_PHI / 2] = 1'b1;
    end
    @(negedge clk);
    wire_in = '0;
    @(negedge clk);   // arrivals are separate pulses, at least one clock apart
  endtask

  // run `n` arrivals with probability 1/period per clock
  task automatic run_phase(input string name, input int n, input int period, input bit pair,
                           output int arrived, output int lost);
    int lost0, pt0;
    lost0 = int'(lost_count); pt0 = int'(pretrig_count);
    arrived = 0;
    max_busy = 0;
    while (arrived < n) begin
      if ($urandom_range(0, period - 1) == 0) begin
        event_pulse(pair);
        arrived++;
      end else @(negedge clk);
    end
    repeat (3000) @(negedge clk);
    lost = int'(lost_count) - lost0;
    checks++;
    if (int'(pretrig_count) - pt0 + lost != arrived)
      fail($sformatf("%s: %0d pre-triggers + %0d lost != %0d arrivals", name, int'(pretrig_count) - pt0, lost, arrived));
    $display("%s: %0d arrivals, %0d lost (%0d.%0d %%), longest busy %0d clocks",
             name, arrived, lost, lost * 100 / arrived, (lost * 1000 / arrived) % 10, max_busy);
  endtask

  initial begin
    int arr, lost, nro0;
    ctrl = '0;
    ctrl.acc_ctrl    = 7'b0011100;
    ctrl.trk_min     = 2;
    ctrl.trk_max     = 6;
    ctrl.dec_trk_min = 2;
    ctrl.theta_sel   = '1;
    ctrl.use_tz      = 1;
    ctrl.tz_min      = 15;     // phase B: theta-z acceptance out of reach
    repeat (3) @(negedge clk);
    rst_n = 1;
    counter_in = 1; machine_gate = 1;

    // phase A: pre-trigger rate 1e5/s, all fast rejects
    run_phase("1e5/s pre-triggers", 1500, 100, 0, arr, lost);
    checks++;
    if (max_busy > 5) fail($sformatf("fast reject busy for %0d clocks", max_busy));
    checks++;
    if (lost * 20 >= arr) fail("more than 5 % lost at 1e5/s");
    checks++;
    if (n_fast != arr - lost) fail($sformatf("%0d fast rejects for %0d pre-triggers", n_fast, arr - lost));
    if (lost == 0) fail("no arrival lost while busy in phase A");

    // phase B: main triggers at 1e4/s, decision rejects after a full turn
    run_phase("1e4/s main triggers", 100, 1000, 1, arr, lost);
    checks++;
    if (max_busy > 1000) fail($sformatf("sequential logic busy for %0d clocks", max_busy));
    checks++;
    if (n_dec != arr - lost) fail($sformatf("%0d decision rejects for %0d main triggers", n_dec, arr - lost));

    // phase C: read-outs at 1e2/s through a slow computer
    ctrl.use_tz = 0;
    reading = 1;
    nro0 = n_ro;
    run_phase("1e2/s read-outs", 12, 10000, 1, arr, lost);
    repeat (1000) @(negedge clk);
    checks++;
    if (n_ro - nro0 != arr - lost) fail($sformatf("%0d read-outs for %0d events", n_ro - nro0, arr - lost));
    checks++;
    if (words != 35 * (n_ro - nro0)) fail($sformatf("%0d words read for %0d records", words, n_ro - nro0));
    checks++;
    if (dut.u_fifo.level != 0) fail("buffer not drained");
    $display("mechanisms: fast_reject=%0d decision_reject=%0d readout=%0d", n_fast, n_dec, n_ro);
    if (n_fast == 0) fail("no fast reject");
    if (n_dec == 0) fail("no decision reject");
    if (n_ro == 0) fail("no read-out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
