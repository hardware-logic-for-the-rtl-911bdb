// rotation_pattern_unit_tb: rotates random and hand-made events through a
// full turn; the per-pattern counts are compared with a model that evaluates
// every rotation of the event directly, and a straight track, a curved track
// and a collinear pair must each be found.  After each turn the fired-wire
// counts must equal the number of set bits in each ring, and the symmetry
// count must equal the number of orientations at which both half circles
// hold a straight direction (computed directly from the event).
module rotation_pattern_unit_tb;
  localparam int N = 120;
  logic clk = 0, rst_n = 0;
  logic load, clear, step;
  logic [N-1:0] ri, ro;
  logic [3:0] match;
  logic [7:0] count [4];
  logic [6:0] wci, wco, symc;
  int checks = 0, failures = 0;
  int n_sym_all = 0, n_sym_part = 0;

  always #5 clk = ~clk;
  rotation_pattern_unit dut (.clk, .rst_n, .load, .in_ring(ri), .out_ring(ro), .clear, .step,
                             .match, .count, .wire_cnt_in(wci), .wire_cnt_out(wco),
                             .sym_count(symc));

  // pattern p at rotation s (position s of the event under the window centre)
  function automatic bit pat_at(input int p, input int s);
    bit ii, oo, ii2, oo2;
    int olo, ohi;
    case (p)
      0, 3: begin olo = -1; ohi = 1; end
      1:    begin olo = 2;  ohi = 4; end
      default: begin olo = -4; ohi = -2; end
    endcase
    ii = ri[s % N]; oo = 0;
    for (int k = olo; k <= ohi; k++) oo |= ro[(s + k + N) % N];
    ii2 = ri[(s + N/2) % N]; oo2 = 0;
    for (int k = olo; k <= ohi; k++) oo2 |= ro[(s + N/2 + k + N) % N];
    return (p == 3) ? (ii & oo & ii2 & oo2) : (ii & oo);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic bit dir_at(input int k);
    return ri[k % N] & (ro[(k + N - 1) % N] | ro[k % N] | ro[(k + 1) % N]);
  endfunction

  task automatic run_event(input string what);
    int m [4];
    int ms;
    ms = 0;
    for (int s = 0; s < N; s++) begin
      bit h0, h1;
      h0 = 0; h1 = 0;
      for (int k = 0; k < N / 2; k++) begin h0 |= dir_at(s + k); h1 |= dir_at(s + N / 2 + k); end
      ms += (h0 & h1);
    end
    for (int p = 0; p < 4; p++) begin
      m[p] = 0;
      for (int s = 0; s < N; s++) m[p] += pat_at(p, s);
    end
    @(negedge clk); load = 1; clear = 1;
    @(negedge clk); load = 0; clear = 0;
    repeat (N) begin step = 1; @(negedge clk); end
    step = 0;
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (int'(count[p]) != m[p]) begin failures++; $display("FAIL %s pattern %0d: %0d exp %0d", what, p, count[p], m[p]); end
    end
    checks++;
    if (int'(wci) != $countones(ri) || int'(wco) != $countones(ro)) begin
      failures++; $display("FAIL %s wire counts %0d/%0d exp %0d/%0d", what, wci, wco, $countones(ri), $countones(ro));
    end
    checks++;
    if (int'(symc) != ms) begin failures++; $display("FAIL %s symmetry count %0d exp %0d", what, symc, ms); end
    if (ms == N) n_sym_all++;
    if (ms > 0 && ms < N) n_sym_part++;
  endtask

  initial begin
    load = 0; clear = 0; step = 0; ri = '0; ro = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // straight track at 30, curved track at 70 (outer wire +3), collinear pair 5/65
    ri = '0; ro = '0;
    ri[30] = 1; ro[30] = 1;
    ri[70] = 1; ro[73] = 1;
    ri[5] = 1; ro[5] = 1; ri[65] = 1; ro[66] = 1;
    run_event("hand");
    checks++;
    if (count[0] < 3 || count[1] < 1 || count[3] < 2) begin failures++; $display("FAIL hand-made shapes not found"); end
    repeat (30) begin
      for (int i = 0; i < N; i += 30) begin
        ri[i +: 30] = 30'($urandom & $urandom & $urandom);
        ro[i +: 30] = 30'($urandom & $urandom);
      end
      run_event("random");
    end
    // three straight tracks 120 degrees apart: balanced at every orientation
    ri = '0; ro = '0;
    ri[10] = 1; ro[10] = 1; ri[50] = 1; ro[50] = 1; ri[90] = 1; ro[90] = 1;
    run_event("three-prong");
    checks++;
    if (symc != N) begin failures++; $display("FAIL three-prong symmetry %0d", symc); end
    checks++;
    if (n_sym_all == 0 || n_sym_part == 0) begin failures++; $display("FAIL symmetry cases not both seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
