// angular_correlation: rough collinearity test on a ring of direction
// telescopes (Figs. 3 and 4 of the source).
//
// One correlation circuit ORs the telescopes of a 120-degree sector and of
// the opposite 120-degree sector and ANDs the two ORs: C = 1 means at least one
// track in each sector.  Six such circuits, rotated by 30 degrees from one to
// the next, cover the whole circle and their outputs are ORed.  With these
// sectors an event confined to one 30-degree sector never fires and an event
// that no 60-degree sector can hold always fires.
//
// Combinational.  Sector k covers telescopes [k*N/12, k*N/12 + N/3) and its
// partner the same range shifted by N/2, indices wrapping; the placement of the
// sectors on the telescope numbering is this design's choice.
module angular_correlation #(
  parameter int unsigned N     = trig_pkg::N_PHI, // telescopes on the circle
  parameter int unsigned NPAIR = 6                // correlation circuits
) (
  input  logic [N-1:0]     d,
  output logic [NPAIR-1:0] c_pair,
  output logic             c_any
);
  localparam int STEP = int'(N) / (2 * int'(NPAIR)); // 30 degrees for 6 pairs
  localparam int SECT = int'(N) / 3;                 // 120 degrees

  for (genvar k = 0; k < int'(NPAIR); k++) begin : g_pair
    logic [SECT-1:0] sa, sb;
    for (genvar j = 0; j < SECT; j++) begin : g_j
      assign sa[j] = d[(k*STEP + j) % int'(N)];
      assign sb[j] = d[(k*STEP + j + int'(N)/2) % int'(N)];
    end
    assign c_pair[k] = (|sa) & (|sb);
  end

  assign c_any = |c_pair;
endmodule
