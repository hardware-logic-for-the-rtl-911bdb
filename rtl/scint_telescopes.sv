// scint_telescopes: bank of three-chamber direction telescopes with a plastic
// scintillator strobe (Fig. 2a of the source):
//     d[i] = s AND a[i] AND (b[i-1] OR b[i] OR b[i+1]) AND (c[i-1] OR c[i] OR c[i+1])
// a, b, c are three concentric cylindrical wire chambers with the same number
// of wires, so indices wrap around the circle.  s is the scintillator, the
// signal with the best time resolution, which times the coincidence.
// Combinational; active-high here where the source draws NAND logic.
// The number of telescopes is this design's choice.
module scint_telescopes #(
  parameter int unsigned N = trig_pkg::N_PHI
) (
  input  logic         s,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] d
);
  for (genvar i = 0; i < int'(N); i++) begin : g_tel
    localparam int IM = (i + int'(N) - 1) % int'(N);
    localparam int IP = (i + 1) % int'(N);
    assign d[i] = s & a[i] & (b[IM] | b[i] | b[IP]) & (c[IM] | c[i] | c[IP]);
  end
endmodule
