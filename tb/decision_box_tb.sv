// decision_box_tb: random inputs and enables; exactly one of start_readout
// and reject must pulse one clock after eval, as the acceptance rule says.
module decision_box_tb;
  localparam int N = 120;
  logic clk = 0, rst_n = 0;
  logic eval, use_phi, copl, use_copl, use_tz, sr, rj;
  logic [6:0] tc, tmin;
  logic [N-1:0] d, psel;
  logic [3:0] tzc, tzmin;
  int checks = 0, failures = 0, n_acc = 0, n_rej = 0;

  always #5 clk = ~clk;
  decision_box dut (.clk, .rst_n, .eval, .track_count(tc), .trk_min(tmin), .d, .phi_sel(psel),
    .use_phi, .copl, .use_copl, .tz_count(tzc), .tz_min(tzmin), .use_tz,
    .start_readout(sr), .reject(rj));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    eval = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (1000) begin
      bit acc;
      @(negedge clk);
      tc = 7'($urandom_range(0, 6)); tmin = 7'($urandom_range(0, 3));
      d = '0; d[$urandom_range(0, N - 1)] = 1; d[$urandom_range(0, N - 1)] = 1;
      psel = '0; for (int i = $urandom_range(0, 60); i < 60 + $urandom_range(0, 59); i++) psel[i] = 1;
      use_phi = $urandom_range(0, 1); copl = $urandom_range(0, 1); use_copl = $urandom_range(0, 1);
      tzc = 4'($urandom); tzmin = 4'($urandom_range(0, 6)); use_tz = $urandom_range(0, 1);
      eval = $urandom_range(0, 3) != 0;
      acc = (tc >= tmin);
      if (use_phi && (d & psel) == 0) acc = 0;
      if (use_copl && !copl) acc = 0;
      if (use_tz && tzc < tzmin) acc = 0;
      @(negedge clk);
      checks++;
      if (sr !== (eval & acc) || rj !== (eval & ~acc)) begin
        failures++; $display("FAIL sr=%b rj=%b eval=%b acc=%b", sr, rj, eval, acc);
      end
      if (eval) begin if (acc) n_acc++; else n_rej++; end
      eval = 0;
    end
    if (n_acc == 0 || n_rej == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
