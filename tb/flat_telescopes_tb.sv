// flat_telescopes_tb: self-checking test of the flat-chamber telescope row.
//
// Part 1 drives random sparse wire patterns and compares every direction with
// a reference that lists, for telescope i, the a wires {2i, 2i+1} and the b
// wire numbers 2i-1 .. 2i+2.  Part 2 generates straight tracks geometrically:
// a source point x0 (in units of the wire spacing) on the source line, and a
// crossing point xa in chamber a; chamber b, half as far again from a, is hit
// at xb = xa + (xa - x0) / 2.  Each wire owns the cell [k - 1/2, k + 1/2).
// A track whose a crossing lies in telescope i's cell and whose source lies
// within one a cell of that telescope's axis must fire d[i] (full
// acceptance).  Prints TB_RESULT and stops; a watchdog stops a hung run.
module flat_telescopes_tb;
  localparam int NT = 48;
  localparam int NA = 2 * NT;
  localparam int NB = 2 * NT + 2;

  logic [NA-1:0] a;
  logic [NB-1:0] b;
  logic [NT-1:0] d;
  int checks = 0, failures = 0, accepted = 0;

  flat_telescopes #(.NT(NT)) dut (.a, .b, .d);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic bwire(input int k);   // chamber b wire number k
    return (k >= -1 && k <= 2 * NT) ? b[k + 1] : 1'b0;
  endfunction

  initial begin
    // part 1: random patterns
    for (int t = 0; t < 400; t++) begin
      logic [NT-1:0] e;
      a = '0; b = '0;
      for (int n = 0; n < 6; n++) begin
        a[$urandom % NA] = 1'b1;
        b[$urandom % NB] = 1'b1;
      end
      #1;
      for (int i = 0; i < NT; i++) begin
        logic ha, hb;
        ha = a[2 * i] | a[2 * i + 1];
        hb = 0;
        for (int k = 2 * i - 1; k <= 2 * i + 2; k++) hb |= bwire(k);
        e[i] = ha & hb;
      end
      checks++;
      if (d !== e) begin
        failures++;
        $display("random %0d: d=%h expected %h", t, d, e);
      end
    end
    // part 2: straight tracks, coordinates in 1/100 of the wire spacing
    for (int t = 0; t < 2000; t++) begin
      int i, xc, xa, x0, xb, ka, kb;
      i  = $urandom_range(0, NT - 1);
      xc = 200 * i + 50;                               // axis between wires 2i and 2i+1
      xa = xc - 100 + $urandom_range(0, 199);          // inside the two-wire a cell
      x0 = xc - 100 + $urandom_range(0, 200);          // source within one cell of the axis
      xb = xa + (xa - x0) / 2;
      ka = (xa + 50) / 100;
      kb = (xb + 50 + 1000) / 100 - 10;                // floor for negative values too
      a = '0; b = '0;
      a[ka] = 1'b1;
      if (kb >= -1 && kb <= 2 * NT) b[kb + 1] = 1'b1;
      #1;
      checks++;
      if (!d[i]) begin
        failures++;
        $display("track i=%0d xa=%0d x0=%0d xb=%0d (a wire %0d, b wire %0d) not accepted", i, xa, x0, xb, ka, kb);
      end else accepted++;
      checks++;
      if ($countones(d) != 1) begin
        failures++;
        $display("track i=%0d fired %0d telescopes", i, $countones(d));
      end
    end
    $display("%0d tracks accepted", accepted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
