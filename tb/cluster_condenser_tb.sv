// cluster_condenser_tb: the printed truth table, then random rings whose
// condensed output must have one 1 per cluster of adjacent 1s.
module cluster_condenser_tb;
  localparam int N = 120;
  logic [N-1:0] a, b;
  logic         all1;
  int checks = 0, failures = 0;

  cluster_condenser dut (.a(a), .b(b), .all_ones(all1));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // truth table on element 5 (A_i, A_{i-1}) -> B_i active high
    for (int t = 0; t < 4; t++) begin
      a = '0; a[5] = t[1]; a[4] = t[0]; #1;
      checks++;
      if (b[5] !== (t[1] & ~t[0])) begin failures++; $display("FAIL truth table row %0d", t); end
    end
    repeat (500) begin
      int clusters;
      for (int i = 0; i < N; i += 30) a[i +: 30] = 30'($urandom | $urandom);
      if ($urandom_range(0, 3) == 0) a = a & (a >> 1);
      #1;
      clusters = 0;
      for (int i = 0; i < N; i++) if (a[i] && !a[(i + N - 1) % N]) clusters++;
      checks++;
      if ($countones(b) != clusters) begin failures++; $display("FAIL clusters %0d got %0d", clusters, $countones(b)); end
      checks++;
      if (all1 !== (&a)) failures++;
    end
    a = '1; #1; checks++;
    if (!all1 || b != '0) begin failures++; $display("FAIL all-ones ring"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
