// trig_pkg: sizes, geometry and helper functions shared by the event
// selection logic of a two-chamber cylindrical detector (inner and outer
// proportional wire chamber, each with one anode wire every 3 degrees in phi
// and cathode stripes read out along z).
//
// Sizes that the design follows from its source: 240 wires in total (one every
// 3 degrees in each of two chambers, so 120 per chamber), 260 cathode stripes,
// 2 cm stripe pitch, chamber radii 200 mm and 300 mm, a telescope acceptance
// of 7 outer wires (Fig. 2c style "variable" telescope).
// This design's own choices: chamber lengths of 500 mm and 800 mm read from the
// set-up drawing, the split of the 260 stripes into 2 chambers x 2 cathodes
// x 2 half-circles, the number of theta intervals, the 10 MHz step clock and
// the read-out word width.
package trig_pkg;

  // ---------------- phi view (anode wires) -------------------------------
  localparam int unsigned N_PHI      = 120;           // wires per chamber (360/3)
  localparam int unsigned N_WIRES    = 2 * N_PHI;     // 240 wires in total
  localparam int unsigned TEL_WIDTH  = 7;             // outer wires per telescope

  // ---------------- z view (cathode stripes) -----------------------------
  localparam int unsigned PITCH_MM   = 20;            // 2 cm stripes
  localparam int unsigned R_IN_MM    = 200;           // inner chamber radius
  localparam int unsigned R_OUT_MM   = 300;           // outer chamber radius
  localparam int unsigned L_IN_MM    = 500;           // inner chamber length
  localparam int unsigned L_OUT_MM   = 800;           // outer chamber length
  localparam int unsigned NZ_IN      = L_IN_MM / PITCH_MM;   // 25 stripes per half
  localparam int unsigned NZ_OUT     = L_OUT_MM / PITCH_MM;  // 40 stripes per half
  // stripes of one cathode, both half-circles: 2*25 = 50 (inner), 2*40 = 80 (outer)
  localparam int unsigned N_STRIPES  = 2 * (2 * NZ_IN) + 2 * (2 * NZ_OUT); // 260

  // Stripe numbering inside the 260-bit stripe vector:
  //   inner chamber:  cathode*50  + half*25 + z        (0   .. 99)
  //   outer chamber:  100 + cathode*80 + half*40 + z   (100 .. 259)
  function automatic int unsigned stripe_index(input int unsigned chamber,
                                               input int unsigned cathode,
                                               input int unsigned half,
                                               input int unsigned z);
    if (chamber == 0)
      return cathode * (2 * NZ_IN) + half * NZ_IN + z;
    else
      return 4 * NZ_IN + cathode * (2 * NZ_OUT) + half * NZ_OUT + z;
  endfunction

  // ---------------- theta-z telescopes -----------------------------------
  // A theta interval j is the set of tracks that cross the inner chamber j
  // stripes away (along z) from their origin.  The outer crossing is then
  // j*PITCH*R_OUT/R_IN away; the outer stripes that overlap that point
  // within +-PITCH/2 form the outer leg of the telescope.
  localparam int THETA_JMAX = 8;
  localparam int N_THETA    = 2 * THETA_JMAX + 1;   // 17 theta intervals

  // Outer crossing point for source step 0, in mm from the outer chamber's
  // first stripe edge, for interval j.  The source sits on inner stripe
  // centres: z_src(t) = (t + 1/2) * PITCH - L_IN/2.
  function automatic int outer_pos_mm(input int j);
    return int'(PITCH_MM) / 2 - int'(L_IN_MM) / 2
         + (j * int'(PITCH_MM) * int'(R_OUT_MM)) / int'(R_IN_MM)
         + int'(L_OUT_MM) / 2;
  endfunction

  // Lowest / highest outer stripe offset m (relative to the source step)
  // whose extent [m*P, (m+1)*P) overlaps (pos - P/2, pos + P/2).
  function automatic int outer_m_lo(input int j);
    int m;
    m = -64;
    while (!((m + 1) * int'(PITCH_MM) > outer_pos_mm(j) - int'(PITCH_MM) / 2)) m++;
    return m;
  endfunction

  function automatic int outer_m_hi(input int j);
    int m;
    m = 128;
    while (!(m * int'(PITCH_MM) < outer_pos_mm(j) + int'(PITCH_MM) / 2)) m--;
    return m;
  endfunction

  // Padding the outer translation register needs below the source point so
  // that every outer leg index PAD_O + outer_m_lo(j) is >= 0.
  function automatic int tz_pad_o(input int jmax);
    int pad;
    pad = 0;
    for (int j = -jmax; j <= jmax; j++)
      if (-outer_m_lo(j) > pad) pad = -outer_m_lo(j);
    return pad;
  endfunction

  // ---------------- read-out ----------------------------------------------
  localparam int unsigned WORD_W = 16;                 // read-out word width

  // ---------------- external control levels -------------------------------
  localparam int unsigned TRK_W = $clog2(N_PHI + 1);   // track count width
  localparam int unsigned TZC_W = 4;                   // theta-z counter width

  typedef struct packed {
    logic [TEL_WIDTH-1:0] acc_ctrl;   // phi telescope acceptance (7 outer wires)
    logic [TRK_W-1:0]     trk_min;    // main trigger: fewest tracks in phi
    logic [TRK_W-1:0]     trk_max;    // main trigger: most tracks in phi
    logic [TRK_W-1:0]     dec_trk_min;// decision box: fewest tracks in phi
    logic [N_PHI-1:0]     phi_sel;    // decision box: selected phi interval
    logic                 use_phi;
    logic                 use_copl;   // decision box: require collinear pair
    logic [N_THETA-1:0]   theta_sel;  // selected theta intervals
    logic [TZC_W-1:0]     tz_min;     // decision box: theta-z count acceptance
    logic                 use_tz;
  } ctrl_t;

  function automatic int unsigned ceil_div(input int unsigned a, input int unsigned b);
    return (a + b - 1) / b;
  endfunction

endpackage
