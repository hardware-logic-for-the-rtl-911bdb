// theta_z_telescopes_tb: the testbench plays the translation itself (step t
// puts stripe m+t at position PAD+m) and compares the telescope outputs with
// a model written in millimetres: interval j needs the inner stripe j stripes
// from the source and an outer stripe whose centre is within one pitch of the
// point 1.5*j pitches from the source.  Straight tracks generated from a
// source point and an angle must be found at their own step and interval.
module theta_z_telescopes_tb;
  localparam int NZI = 25, NZO = 40, JMAX = 8, NT = 17, PAD_I = 8, PAD_O = 5;
  logic [PAD_I+NZI-1:0] in_q;
  logic [PAD_O+NZO-1:0] out_q;
  logic [NT-1:0]        hit;
  logic [NZI-1:0] inner;
  logic [NZO-1:0] outer;
  int checks = 0, failures = 0, tracks_found = 0;

  theta_z_telescopes dut (.in_q, .out_q, .hit);

  function automatic logic [NT-1:0] model(input int t);
    logic [NT-1:0] r;
    for (int j = -JMAX; j <= JMAX; j++) begin
      int zs, pos;
      logic leg;
      zs  = (2 * t + 1) * 10 - 250;      // source, mm from chamber centre
      pos = zs + 30 * j + 400;           // outer crossing, mm from outer start
      leg = 0;
      for (int k = 0; k < NZO; k++)
        if (outer[k] && (20 * k + 10 - pos < 20) && (pos - 20 * k - 10 < 20)) leg = 1;
      r[j + JMAX] = (t + j >= 0 && t + j < NZI) ? (inner[t + j] & leg) : 1'b0;
    end
    return r;
  endfunction

  task automatic place(input int t);
    for (int m = -PAD_I; m < NZI; m++)
      in_q[PAD_I + m] = (m + t >= 0 && m + t < NZI) ? inner[m + t] : 1'b0;
    for (int m = -PAD_O; m < NZO; m++)
      out_q[PAD_O + m] = (m + t >= 0 && m + t < NZO) ? outer[m + t] : 1'b0;
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // random stripe images, every step
    repeat (60) begin
      inner = NZI'($urandom & $urandom);
      outer = {8'($urandom & $urandom), 32'($urandom & $urandom)};
      for (int t = 0; t < NZI; t++) begin
        place(t); #1;
        checks++;
        if (hit !== model(t)) begin failures++; $display("FAIL t=%0d hit=%b exp=%b", t, hit, model(t)); end
      end
    end
    // single straight tracks from source step ts with interval js
    repeat (200) begin
      int ts, js, zs, zi, zo;
      ts = $urandom_range(0, NZI - 1);
      js = $urandom_range(0, 2 * JMAX) - JMAX;
      if (ts + js < 0 || ts + js >= NZI) continue;
      zs = (2 * ts + 1) * 10 - 250;
      zi = zs + 20 * js + 250;                // mm from inner start
      zo = zs + 30 * js + 400;                // mm from outer start
      if (zo < 0 || zo >= 800) continue;
      inner = '0; outer = '0;
      inner[zi / 20] = 1;
      outer[zo / 20] = 1;
      place(ts); #1;
      checks++;
      if (!hit[js + JMAX]) begin failures++; $display("FAIL track t=%0d j=%0d missed", ts, js); end
      else tracks_found++;
    end
    if (tracks_found == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
