// pretrigger_master_tb: conditions arrive at random; a reference model of the
// busy flip-flop checks pre-trigger, busy and both scalers every clock.
module pretrigger_master_tb;
  logic clk = 0, rst_n = 0;
  logic cond, clear, pt, busy;
  logic [23:0] pc, lc;
  int checks = 0, failures = 0;
  bit m_busy = 0, m_pt = 0, m_cq = 0;
  int m_pc = 0, m_lc = 0, n_lost_seen = 0;

  always #5 clk = ~clk;
  pretrigger_master dut (.clk, .rst_n, .cond, .clear, .pretrigger(pt), .busy,
                         .pretrig_count(pc), .lost_count(lc));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cond = 0; clear = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3000) begin
      @(negedge clk);
      cond  = $urandom_range(0, 3) == 0;
      clear = $urandom_range(0, 4) == 0;
      @(posedge clk);
      // model update with the values sampled at this edge
      if (cond && m_cq == 0 && m_busy) begin m_lc++; n_lost_seen++; end
      m_pt = cond & ~m_busy;
      if (cond & ~m_busy) begin m_busy = 1; m_pc++; end
      else if (clear) m_busy = 0;
      m_cq = cond;
      #1;
      checks++;
      if (pt !== m_pt || busy !== m_busy || int'(pc) != m_pc || int'(lc) != m_lc) begin
        failures++;
        $display("FAIL pt=%b/%b busy=%b/%b pc=%0d/%0d lc=%0d/%0d", pt, m_pt, busy, m_busy, pc, m_pc, lc, m_lc);
      end
    end
    if (m_pc == 0 || n_lost_seen == 0) begin failures++; $display("FAIL no pre-trigger or no lost condition"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
