// majority_counter: fast "counter" of the number of 1s on many input lines
// (majority coincidence, Fig. 5 of the source).
//
// The source sums one current per active line in an operational amplifier and
// compares the result with a ladder of discriminator levels whose outputs are
// gated by a strobe; each input can be vetoed.  This is the digital
// equivalent the source also mentions (a pyramid of adders): count is the
// number of lines with in = 1 and veto = 0, and level[k] = strobe AND
// (count >= LEVELS[k]).  The default levels are the four printed in the
// figure, >0, >=1, >=2 and >=8; in integer arithmetic the first two coincide.
// Combinational; the caller registers the strobed levels if needed.
module majority_counter #(
  parameter int unsigned N    = trig_pkg::N_PHI,  // input lines (source: up to ~200)
  parameter int unsigned NLEV = 4,                // discriminator levels
  parameter int unsigned LEVELS [NLEV] = '{1, 1, 2, 8},
  localparam int unsigned CW  = $clog2(N + 1)
) (
  input  logic [N-1:0]    in,
  input  logic [N-1:0]    veto,    // 1 = line vetoed
  input  logic            strobe,
  output logic [CW-1:0]   count,
  output logic [NLEV-1:0] level
);
  always_comb begin
    count = '0;
    for (int i = 0; i < int'(N); i++)
      if (in[i] && !veto[i]) count = count + 1'b1;
  end

  for (genvar k = 0; k < int'(NLEV); k++) begin : g_lev
    assign level[k] = strobe & (32'(count) >= LEVELS[k]);
  end
endmodule
