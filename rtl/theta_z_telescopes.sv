// theta_z_telescopes: one wired telescope per theta interval for tracks from
// a fixed source point on the beam axis (the single-row-of-circuits scheme of
// Fig. 1b, built with stripe geometry as in Fig. 2b).
//
// Stripes of the inner (radius R_IN) and outer (radius R_OUT) chamber come
// from two translation registers.  Inner position PAD_I is the stripe under
// the current source point.  A track of theta interval j crosses the inner
// chamber j stripes further along z and the outer chamber at
// j*PITCH*R_OUT/R_IN; the outer leg of the telescope is the OR of the outer
// stripes within half a stripe of that point (one stripe when the point
// falls on a stripe centre, two when it falls on a boundary):
//     hit[j+JMAX] = in_q[PAD_I + j] AND OR_{m=lo(j)..hi(j)} out_q[PAD_O + m]
// The offsets lo(j), hi(j) are computed at elaboration from the geometry
// constants in trig_pkg.  Combinational.  While the registers translate the
// event, a hit on output j in step t gives theta (j) and the origin z (t).
// The tolerance of half a stripe and the theta granularity of one inner stripe
// are this design's choices.
module theta_z_telescopes
  import trig_pkg::*;
#(
  parameter int JMAX   = trig_pkg::THETA_JMAX,
  parameter int NZI    = int'(trig_pkg::NZ_IN),
  parameter int NZO    = int'(trig_pkg::NZ_OUT),
  localparam int NT    = 2 * JMAX + 1,
  localparam int PAD_I = JMAX,
  localparam int PAD_O = tz_pad_o(JMAX)
) (
  input  logic [PAD_I+NZI-1:0] in_q,   // inner translation register
  input  logic [PAD_O+NZO-1:0] out_q,  // outer translation register
  output logic [NT-1:0]        hit     // one output per theta interval
);
  for (genvar j = -JMAX; j <= JMAX; j++) begin : g_th
    localparam int LO = outer_m_lo(j);
    localparam int HI = outer_m_hi(j);
    logic [HI-LO:0] leg;
    for (genvar m = LO; m <= HI; m++) begin : g_m
      if (PAD_O + m < PAD_O + NZO) begin : g_in
        assign leg[m-LO] = out_q[PAD_O + m];
      end else begin : g_out
        assign leg[m-LO] = 1'b0;   // beyond the end of the outer chamber
      end
    end
    assign hit[j+JMAX] = in_q[PAD_I + j] & (|leg);
  end
endmodule
