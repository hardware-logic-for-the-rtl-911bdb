// derand_fifo_tb: random writes and reads against a queue model; data order,
// full, empty and level are checked every clock, and both full and empty
// must be reached.
module derand_fifo_tb;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en, full, empty;
  logic [15:0] wd, rdat;
  logic [4:0] level;
  logic [15:0] q [$];
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;

  always #5 clk = ~clk;
  derand_fifo #(.DEPTH(16)) dut (.clk, .rst_n, .wr_en, .wr_data(wd), .full, .rd_en,
                                 .rd_data(rdat), .empty, .level);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wd = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int phase;
      @(negedge clk);
      phase = (t / 300) % 2;
      checks++;
      if (int'(level) != q.size() || full !== (q.size() == 16) || empty !== (q.size() == 0)) begin
        failures++; $display("FAIL level %0d model %0d", level, q.size());
      end
      if (!empty) begin
        checks++;
        if (rdat !== q[0]) begin failures++; $display("FAIL data %h exp %h", rdat, q[0]); end
      end
      if (full) n_full++;
      if (empty) n_empty++;
      wr_en = $urandom_range(0, 9) < (phase ? 8 : 2);
      rd_en = $urandom_range(0, 9) < (phase ? 2 : 8);
      wd = 16'($urandom);
      @(posedge clk);
      if (rd_en && q.size() > 0) void'(q.pop_front());
      if (wr_en && q.size() < 16 + (rd_en && q.size() > 0 ? 1 : 0) && !full) q.push_back(wd);
    end
    if (n_full == 0 || n_empty == 0) begin failures++; $display("FAIL full/empty never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
