// flat_telescopes: a row of direction telescopes for two flat wire chambers
// with equal wire spacing, the lower one (a) twice as far from the source
// line as the upper one (b) is from a (B = 2A).
//
// Telescope i takes a cell of two adjacent wires of chamber a (2i, 2i+1) and
// the group of chamber-b wires that tracks through that cell can reach when
// they come from a source region one a-cell wide around the telescope axis.
// From a to b the track spreads by half its offset from the source, which
// gives the four b wires 2i-1 .. 2i+2:
//     d[i] = (a[2i] OR a[2i+1]) AND (b[2i-1] OR b[2i] OR b[2i+1] OR b[2i+2])
// Neighbouring telescopes share two b wires, as wired ORs on the b side.
// Chamber b has one extra wire on each side, so port b is indexed from wire
// -1: b[k+1] is wire k.  Combinational.
//
// The chamber distances (B = 2A), equal wire spacing and the count of 48
// telescopes follow the source; the two-wire a cell, the width of the source
// region and hence the four-wire b group are this design's reading of the
// drawing.
module flat_telescopes #(
  parameter int unsigned NT = 48,
  localparam int unsigned NA = 2 * NT,
  localparam int unsigned NB = 2 * NT + 2
) (
  input  logic [NA-1:0] a,   // chamber a (nearer the source)
  input  logic [NB-1:0] b,   // chamber b, b[k+1] = wire k, k = -1 .. 2*NT
  output logic [NT-1:0] d    // directions
);
  for (genvar i = 0; i < int'(NT); i++) begin : g_tel
    // b wires 2i-1 .. 2i+2 sit at port positions 2i .. 2i+3
    assign d[i] = (a[2*i] | a[2*i+1]) & (|b[2*i +: 4]);
  end
endmodule
