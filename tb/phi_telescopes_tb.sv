// phi_telescopes_tb: random wire patterns and acceptance settings against a
// loop model of the telescope equation, plus two hand-made single tracks.
module phi_telescopes_tb;
  localparam int N = 120, W = 7;
  logic [N-1:0] a, b, d;
  logic [W-1:0] ctl;
  logic         any;
  int checks = 0, failures = 0;

  phi_telescopes dut (.a(a), .b(b), .acc_ctrl(ctl), .d(d), .any_track(any));

  function automatic logic [N-1:0] model(input logic [N-1:0] ai, bi, input logic [W-1:0] c);
    logic [N-1:0] r;
    for (int i = 0; i < N; i++) begin
      r[i] = 1'b0;
      for (int k = -3; k <= 3; k++)
        if (ai[i] && bi[(i + k + N) % N] && c[k+3]) r[i] = 1'b1;
    end
    return r;
  endfunction

  task automatic check(input string what);
    logic [N-1:0] e;
    #1;
    e = model(a, b, ctl);
    checks++;
    if (d !== e || any !== (|e)) begin
      failures++;
      $display("FAIL %s: d=%h expected %h", what, d, e);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // a straight radial track at wire 10, outer wire 10
    a = '0; b = '0; a[10] = 1; b[10] = 1; ctl = 7'b1111111; check("straight");
    if (!d[10]) begin failures++; $display("FAIL straight track not seen"); end
    // outer wire 3 away, wrapping the circle: seen only with control bit 6
    a = '0; b = '0; a[118] = 1; b[1] = 1; ctl = 7'b0111111; check("wrap off");
    if (d[118]) begin failures++; $display("FAIL disabled acceptance accepted"); end
    ctl = 7'b1000000; check("wrap on");
    if (!d[118]) begin failures++; $display("FAIL wrap-around telescope missed"); end
    repeat (400) begin
      for (int i = 0; i < N; i += 32) begin a[i +: 32] = $urandom; b[i +: 32] = $urandom & $urandom; end
      a = a & {N/8{8'h11}};
      ctl = W'($urandom);
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
