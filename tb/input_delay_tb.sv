// input_delay_tb: random words; the output must equal the input of DELAY
// clocks earlier (DELAY = 1 default and 3).
module input_delay_tb;
  logic clk = 0, rst_n = 0;
  logic [499:0] din, dout;
  logic [15:0]  d3i, d3o;
  logic [499:0] hist [4];
  logic [15:0]  h3 [4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  input_delay dut (.clk, .rst_n, .din, .dout);
  input_delay #(.W(16), .DELAY(3)) dut3 (.clk, .rst_n, .din(d3i), .dout(d3o));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    din = '0; d3i = '0;
    for (int i = 0; i < 4; i++) begin hist[i] = '0; h3[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      for (int i = 0; i < 500; i += 25) din[i +: 25] = 25'($urandom);
      d3i = 16'($urandom);
      @(posedge clk);
      for (int i = 3; i > 0; i--) begin hist[i] = hist[i-1]; h3[i] = h3[i-1]; end
      hist[0] = din; h3[0] = d3i;
      #1;
      checks++;
      if (dout !== hist[0]) begin failures++; $display("FAIL delay 1 at %0d", t); end
      if (t >= 3) begin
        checks++;
        if (d3o !== h3[2]) begin failures++; $display("FAIL delay 3 at %0d", t); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
