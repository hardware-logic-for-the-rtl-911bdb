// angular_correlation_tb: checks the per-pair outputs against a model built
// from angles in degrees, and the properties of the six-pair circuit with
// 120-degree sectors: tracks within one 60-degree sector never fire, two
// tracks 90 degrees or more apart always fire, a firing event has at least
// two tracks.
module angular_correlation_tb;
  localparam int N = 120;          // 3 degrees per telescope
  logic [N-1:0] d;
  logic [5:0]   cp;
  logic         ca;
  int checks = 0, failures = 0;
  int n_a = 0, n_b = 0;

  angular_correlation dut (.d(d), .c_pair(cp), .c_any(ca));

  // pair k: sector A = [30k, 30k+120) degrees, sector B = A + 180
  function automatic logic [5:0] model(input logic [N-1:0] v);
    logic [5:0] r;
    for (int k = 0; k < 6; k++) begin
      logic ha, hb;
      ha = 0; hb = 0;
      for (int i = 0; i < N; i++) if (v[i]) begin
        int deg, ra, rb;
        deg = 3 * i;
        ra = (deg - 30 * k + 720) % 360;
        rb = (deg - 30 * k - 180 + 720) % 360;
        if (ra < 120) ha = 1;
        if (rb < 120) hb = 1;
      end
      r[k] = ha & hb;
    end
    return r;
  endfunction

  // smallest arc (in telescopes) that holds all set telescopes
  function automatic int min_arc(input logic [N-1:0] v);
    int best;
    best = N;
    for (int s = 0; s < N; s++) if (v[s]) begin
      int span;
      span = 0;
      for (int i = 0; i < N; i++) if (v[i]) begin
        int dd;
        dd = (i - s + N) % N;
        if (dd > span) span = dd;
      end
      if (span + 1 < best) best = span + 1;
    end
    return best;
  endfunction

  // largest circular separation between two set telescopes (0..N/2)
  function automatic int max_sep(input logic [N-1:0] v);
    int m;
    m = 0;
    for (int i = 0; i < N; i++) if (v[i])
      for (int j = 0; j < N; j++) if (v[j]) begin
        int dd;
        dd = (j - i + N) % N;
        if (dd > N / 2) dd = N - dd;
        if (dd > m) m = dd;
      end
    return m;
  endfunction

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (600) begin
      int ntr, arc;
      d = '0;
      ntr = $urandom_range(1, 4);
      if ($urandom_range(0, 1)) begin
        int base;                   // tracks bunched in a narrow sector
        base = $urandom_range(0, N - 1);
        for (int t = 0; t < ntr; t++) d[(base + $urandom_range(0, 14)) % N] = 1;
      end else
        for (int t = 0; t < ntr; t++) d[$urandom_range(0, N - 1)] = 1;
      #1;
      checks++;
      if (cp !== model(d) || ca !== (|model(d))) begin
        failures++; $display("FAIL pairs=%b expected %b", cp, model(d));
      end
      arc = min_arc(d);
      if (arc <= 21) begin  // within 60 degrees (21 telescopes span 60)
        n_a++; checks++;
        if (ca) begin failures++; $display("FAIL 30-degree event fired"); end
      end
      if (max_sep(d) >= 30) begin   // two tracks >= 90 degrees apart
        n_b++; checks++;
        if (!ca) begin failures++; $display("FAIL wide event did not fire"); end
      end
      if (ca && $countones(d) < 2) begin failures++; $display("FAIL single track fired"); end
    end
    if (n_a == 0 || n_b == 0) begin failures++; $display("FAIL property cases not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
