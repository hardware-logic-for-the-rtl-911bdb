// scint_telescopes_tb: random chamber patterns with and without the
// scintillator strobe, against a loop model of the three-chamber telescope.
module scint_telescopes_tb;
  localparam int N = 120;
  logic s;
  logic [N-1:0] a, b, c, d;
  int checks = 0, failures = 0;

  scint_telescopes dut (.s(s), .a(a), .b(b), .c(c), .d(d));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (500) begin
      logic [N-1:0] e;
      for (int i = 0; i < N; i += 30) begin
        a[i +: 30] = 30'($urandom); b[i +: 30] = 30'($urandom & $urandom); c[i +: 30] = 30'($urandom & $urandom);
      end
      s = $urandom_range(0, 3) != 0;
      #1;
      for (int i = 0; i < N; i++) begin
        logic bo, co;
        bo = 0; co = 0;
        for (int k = -1; k <= 1; k++) begin
          bo |= b[(i + k + N) % N];
          co |= c[(i + k + N) % N];
        end
        e[i] = s & a[i] & bo & co;
      end
      checks++;
      if (d !== e) begin failures++; $display("FAIL d=%h exp=%h", d, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
