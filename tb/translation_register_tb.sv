// translation_register_tb: after t shifts position PAD+m must hold stripe
// m+t (zero outside the chamber) for every m in the register.
module translation_register_tb;
  localparam int NZ = 25, PAD = 8;
  logic clk = 0, rst_n = 0;
  logic load, shift;
  logic [NZ-1:0] din;
  logic [PAD+NZ-1:0] q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  translation_register dut (.clk, .rst_n, .load, .din, .shift, .q);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [NZ-1:0] ev;
    load = 0; shift = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (20) begin
      int t;
      @(negedge clk);
      ev = NZ'($urandom); din = ev; load = 1;
      @(negedge clk);
      load = 0; t = 0;
      repeat (40) begin
        for (int m = -PAD; m < NZ; m++) begin
          logic e;
          e = (m + t >= 0 && m + t < NZ) ? ev[m + t] : 1'b0;
          checks++;
          if (q[PAD + m] !== e) begin failures++; $display("FAIL t=%0d m=%0d", t, m); end
        end
        shift = $urandom_range(0, 1);
        @(negedge clk);
        if (shift) t++;
        shift = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
