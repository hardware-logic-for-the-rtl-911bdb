// event_memory_tb: load random events, check the static outputs, shift them
// out word by word and check every word; load must win over shift.
module event_memory_tb;
  localparam int W = 260, WW = 16, NW = 17;
  logic clk = 0, rst_n = 0;
  logic load, shift;
  logic [W-1:0] din, q;
  logic [WW-1:0] word;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  event_memory #(.W(W)) dut (.clk, .rst_n, .load, .din, .shift, .q, .word);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [NW*WW-1:0] ev;
    load = 0; shift = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (40) begin
      @(negedge clk);
      for (int i = 0; i < W; i += 26) din[i +: 26] = 26'($urandom);
      load = 1; shift = $urandom_range(0, 1);   // load has priority
      ev = (NW*WW)'(din);
      @(negedge clk);
      load = 0; shift = 0;
      din = ~din;                               // must not be taken
      @(negedge clk);
      checks++;
      if (q !== ev[W-1:0]) begin failures++; $display("FAIL static outputs"); end
      for (int k = 0; k < NW; k++) begin
        checks++;
        if (word !== ev[k*WW +: WW]) begin failures++; $display("FAIL word %0d", k); end
        shift = 1;
        @(negedge clk);
        shift = 0;
      end
      checks++;
      if (q !== '0) begin failures++; $display("FAIL not empty after read-out"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
