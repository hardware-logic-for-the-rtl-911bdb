// one_turn_clock_tb: a start gives exactly NSTEP steps with idx 0..NSTEP-1 on
// consecutive clocks, then one done pulse; starts while running are ignored.
module one_turn_clock_tb;
  logic clk = 0, rst_n = 0;
  logic start, step, done;
  logic [6:0] idx;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  one_turn_clock dut (.clk, .rst_n, .start, .step, .idx, .done);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (5) begin
      int nsteps, ndone, first, last_step, done_at, cyc;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      nsteps = 0; ndone = 0; done_at = -1; last_step = -1;
      for (cyc = 0; cyc < 140; cyc++) begin
        if (cyc == 30) start = 1;               // ignored while running
        if (cyc == 31) start = 0;
        if (step) begin
          checks++;
          if (int'(idx) != nsteps) begin failures++; $display("FAIL idx %0d exp %0d", idx, nsteps); end
          nsteps++; last_step = cyc;
        end
        if (done) begin ndone++; done_at = cyc; end
        @(negedge clk);
      end
      checks++;
      if (nsteps != 120 || ndone != 1 || done_at != last_step + 1) begin
        failures++; $display("FAIL steps=%0d done=%0d at %0d last %0d", nsteps, ndone, done_at, last_step);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
