// track_counting_tb: random direction patterns, strobed; main trigger or
// reject one clock later according to the cluster count and the window.
module track_counting_tb;
  localparam int N = 120;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] d;
  logic strobe;
  logic [6:0] cmin, cmax, tc;
  logic mt, rj;
  int checks = 0, failures = 0, n_trig = 0, n_rej = 0;

  always #5 clk = ~clk;
  track_counting dut (.clk, .rst_n, .d, .strobe, .cnt_min(cmin), .cnt_max(cmax),
                      .main_trigger(mt), .reject(rj), .track_count(tc));

  function automatic int clusters(input logic [N-1:0] v);
    int c = 0;
    if (&v) return 1;
    for (int i = 0; i < N; i++) if (v[i] && !v[(i + N - 1) % N]) c++;
    return c;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    d = '0; strobe = 0; cmin = 2; cmax = 4;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (400) begin
      int nc;
      bit ok;
      @(negedge clk);
      d = '0;
      repeat ($urandom_range(0, 6)) begin
        int p, w;
        p = $urandom_range(0, N - 1); w = $urandom_range(1, 3);
        for (int k = 0; k < w; k++) d[(p + k) % N] = 1;
      end
      cmin = 7'($urandom_range(0, 3)); cmax = cmin + 7'($urandom_range(0, 3));
      strobe = $urandom_range(0, 4) != 0;
      nc = clusters(d);
      ok = nc >= int'(cmin) && nc <= int'(cmax);
      @(negedge clk);
      checks++;
      if (mt !== (strobe & ok) || rj !== (strobe & ~ok)) begin
        failures++; $display("FAIL clusters=%0d win=%0d..%0d mt=%b rj=%b", nc, cmin, cmax, mt, rj);
      end
      if (strobe) begin
        checks++;
        if (int'(tc) != nc) begin failures++; $display("FAIL count %0d exp %0d", tc, nc); end
      end
      n_trig += int'(mt); n_rej += int'(rj);
      strobe = 0;
    end
    if (n_trig == 0 || n_rej == 0) begin failures++; $display("FAIL trigger or reject never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
