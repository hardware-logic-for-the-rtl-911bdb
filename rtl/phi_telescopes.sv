// phi_telescopes: bank of direction telescopes between the inner and outer
// cylindrical wire chamber (variable-acceptance telescope of Fig. 2c).
//
// For every inner wire a[i] the telescope output is
//     d[i] = a[i] AND OR_k ( b[i+k] AND acc_ctrl[k+H] ),  k = -H .. +H,
// with H = (W-1)/2.  acc_ctrl are external control levels that switch the
// individual outer wires of the acceptance cone on or off (W = 7 intervals as
// in the source).  Wire indices wrap around the circle (the chambers are
// cylinders).  any_track is the OR of all directions, the "at least one track"
// condition used for the pre-trigger.
//
// Purely combinational; the original is NAND logic with wired ORs, written
// here with active-high signals (this design's choice).
module phi_telescopes #(
  parameter int unsigned N = trig_pkg::N_PHI,     // telescopes = inner wires
  parameter int unsigned W = trig_pkg::TEL_WIDTH  // outer wires per telescope (odd)
) (
  input  logic [N-1:0] a,         // inner chamber wires
  input  logic [N-1:0] b,         // outer chamber wires
  input  logic [W-1:0] acc_ctrl,  // 1 = outer wire offset (k+H) is accepted
  output logic [N-1:0] d,         // direction outputs D_i
  output logic         any_track  // OR of all D_i
);
  localparam int H = (int'(W) - 1) / 2;

  for (genvar i = 0; i < int'(N); i++) begin : g_tel
    logic [W-1:0] leg;
    for (genvar k = -H; k <= H; k++) begin : g_leg
      assign leg[k+H] = b[(i + k + int'(N)) % int'(N)] & acc_ctrl[k+H];
    end
    assign d[i] = a[i] & (|leg);
  end

  assign any_track = |d;
endmodule
