// majority_counter_tb: random inputs and vetoes; count against $countones and
// the four strobed levels against the printed thresholds.
module majority_counter_tb;
  localparam int N = 120;
  logic [N-1:0] in, veto;
  logic         strobe;
  logic [6:0]   count;
  logic [3:0]   level;
  int checks = 0, failures = 0;
  int seen8 = 0;

  majority_counter dut (.in(in), .veto(veto), .strobe(strobe), .count(count), .level(level));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (600) begin
      int n, exp_n;
      in = '0; veto = '0;
      n = $urandom_range(0, 12);
      for (int t = 0; t < n; t++) in[$urandom_range(0, N - 1)] = 1;
      if ($urandom_range(0, 1)) in = in | {N/4{4'($urandom)}} & {N/4{4'($urandom)}};
      for (int t = 0; t < 3; t++) veto[$urandom_range(0, N - 1)] = 1;
      strobe = $urandom_range(0, 3) != 0;
      #1;
      exp_n = $countones(in & ~veto);
      checks++;
      if (int'(count) != exp_n) begin failures++; $display("FAIL count %0d exp %0d", count, exp_n); end
      checks++;
      if (level !== {strobe && exp_n >= 8, strobe && exp_n >= 2, strobe && exp_n >= 1, strobe && exp_n > 0}) begin
        failures++; $display("FAIL level %b for %0d", level, exp_n);
      end
      if (strobe && exp_n >= 8) seen8++;
    end
    in = '1; veto = '0; strobe = 1; #1; checks++;
    if (int'(count) != N) begin failures++; $display("FAIL full count %0d", count); end
    if (seen8 == 0) begin failures++; $display("FAIL level 8 never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
