// wire_z_scanner_tb: self-checking test of the shifting wire/diagonal-stripe
// scanner.
//
// Each trial puts one to three random crossing points (wire w, distance z)
// into the chamber, fills the wire row and both stripe rows from them, loads
// the scanner, makes T translation steps (T random 0..3) and then scans all
// NW wires.  After every step the outputs are compared with a reference
// computed directly from the original rows:
//     z_hit[k] = W[s] & L[s - (k+T) + NZ - 1] & R[s + k + T]
// (out-of-range stripes read as 0), together with wire_active, wire_idx,
// z_off, z_valid, z_num and z_multi.  A separate count checks that every
// single-point trial reports its point at (w, z - T) when z >= T.
// Prints TB_RESULT and stops; a watchdog stops a hung run.
module wire_z_scanner_tb;
  localparam int NW = 16;
  localparam int NZ = 6;
  localparam int NS = NW + NZ - 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0, scan = 1'b0, trans = 1'b0;
  logic [NW-1:0] wires;
  logic [NS-1:0] left, right;
  logic wire_active, z_valid, z_multi;
  logic [$clog2(NW+1)-1:0] wire_idx;
  logic [$clog2(NS+1)-1:0] z_off;
  logic [NZ-1:0] z_hit;
  logic [$clog2(NZ)-1:0] z_num;

  int checks = 0, failures = 0, found_single = 0;

  wire_z_scanner #(.NW(NW), .NZ(NZ)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic lbit(input int i);
    return (i >= 0 && i < NS) ? left[i] : 1'b0;
  endfunction
  function automatic logic rbit(input int i);
    return (i >= 0 && i < NS) ? right[i] : 1'b0;
  endfunction

  task automatic check(input int s, input int t, input int pw, input int pz, input bit single);
    logic [NZ-1:0] e;
    int en;
    for (int k = 0; k < NZ; k++)
      e[k] = wires[s] & lbit(s - (k + t) + NZ - 1) & rbit(s + k + t);
    en = 0;
    for (int k = NZ - 1; k >= 0; k--) if (e[k]) en = k;
    checks++;
    if (z_hit !== e || wire_active !== wires[s] || wire_idx !== s || z_off !== t ||
        z_valid !== (|e) || (|e && z_num !== en) || z_multi !== ($countones(e) > 1)) begin
      failures++;
      $display("step %0d T=%0d: z_hit=%b exp %b active=%b idx=%0d off=%0d num=%0d",
               s, t, z_hit, e, wire_active, wire_idx, z_off, z_num);
    end
    if (single && s == pw && pz >= t && pz - t < NZ && z_hit[pz - t]) found_single++;
  endtask

  initial begin
    int n_single = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 300; trial++) begin
      int np, t, pw, pz;
      np = 1 + ($urandom % 3);
      wires = '0; left = '0; right = '0;
      for (int p = 0; p < np; p++) begin
        pw = $urandom % NW;
        pz = $urandom % NZ;
        wires[pw] = 1'b1;
        left[pw - pz + NZ - 1] = 1'b1;
        right[pw + pz] = 1'b1;
      end
      t = $urandom % 4;
      if (np == 1 && pz >= t) n_single++;
      @(negedge clk) load = 1'b1;
      @(negedge clk) load = 1'b0;
      for (int i = 0; i < t; i++) begin
        trans = 1'b1;
        @(negedge clk) trans = 1'b0;
      end
      for (int s = 0; s < NW; s++) begin
        check(s, t, pw, pz, np == 1);
        scan = 1'b1;
        @(negedge clk) scan = 1'b0;
      end
    end
    checks++;
    if (found_single != n_single) begin
      failures++;
      $display("single points found %0d of %0d", found_single, n_single);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
