// wire_z_decoder: coordinate along a wire from a threefold coincidence of the
// wire with two diagonal cathode stripes (Figs. 8 and 9 of the source).
//
// The cathode of a plane chamber is cut into stripes inclined one way (left
// stripes) and the other way (right stripes).  A hit at distance k stripes
// along the wire lies under left stripe k on one side of the wire and right
// stripe k on the other, so
//     z_hit[k] = wire AND left[k] AND right[k],   k = 0 .. NZ-1
// (NZ = 6 outputs Z0..Z5 as printed).  Requiring both stripes removes the
// ambiguity a single stripe set would leave with several tracks.  The outputs
// are also encoded: z_valid, z_num = lowest k that fired, and z_multi when
// more than one fired.  left[k]/right[k] are the stripes as seen from the
// wire, numbered outward; the numbering and the encoder are this design's
// choices.  Combinational.
module wire_z_decoder #(
  parameter int unsigned NZ = 6,
  localparam int unsigned ZW = (NZ > 1) ? $clog2(NZ) : 1
) (
  input  logic          wire_hit,
  input  logic [NZ-1:0] left,
  input  logic [NZ-1:0] right,
  output logic [NZ-1:0] z_hit,
  output logic          z_valid,
  output logic [ZW-1:0] z_num,
  output logic          z_multi
);
  assign z_hit   = {NZ{wire_hit}} & left & right;
  assign z_valid = |z_hit;
  assign z_multi = (z_hit & (z_hit - 1'b1)) != '0;

  always_comb begin
    z_num = '0;
    for (int k = int'(NZ) - 1; k >= 0; k--)
      if (z_hit[k]) z_num = ZW'(k);
  end
endmodule
