// cluster_condenser: cluster condensation (Fig. 6 of the source).
// Each output is B_i = A_i AND NOT A_{i-1}, so only the first element of a run
// of adjacent 1s survives and a following counter counts clusters instead of
// elements.  The truth table printed in the source (active-low B) gives B low
// exactly for A_i = 1, A_{i-1} = 0; here B is active high.
// WRAP = 1 closes the ring (cylindrical chambers): A_{-1} is A_{N-1}; a ring
// that is all 1s then has no first element, and all_ones flags that case so
// that a counter can still count it as one cluster.  WRAP and all_ones are
// this design's additions.  Combinational.
module cluster_condenser #(
  parameter int unsigned N    = trig_pkg::N_PHI,
  parameter bit          WRAP = 1'b1
) (
  input  logic [N-1:0] a,
  output logic [N-1:0] b,
  output logic         all_ones
);
  assign b[0] = a[0] & ~(WRAP ? a[N-1] : 1'b0);
  for (genvar i = 1; i < int'(N); i++) begin : g_b
    assign b[i] = a[i] & ~a[i-1];
  end
  assign all_ones = &a;
endmodule
