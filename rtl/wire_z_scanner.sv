// wire_z_scanner: finds hits along the wires of a plane chamber with
// diagonal cathode stripes by shifting the stored event through one wired
// three-fold decoder, instead of wiring a decoder to every wire.
//
// Geometry: the chamber has NW wires.  Its cathode is cut into "left" stripes
// inclined one way and "right" stripes inclined the other way, read out at
// the chamber edge with the same pitch as the wires.  A hit on wire w at
// distance k along it lies under left stripe w-k and right stripe w+k.  The
// stripe rows are stored with an offset of NZ-1 on the left row so that
// every index is >= 0:
//     left row  : position l = w - k + NZ - 1   (NW + NZ - 1 stripes)
//     right row : position r = w + k            (NW + NZ - 1 stripes)
//
// Operation (one action per clock, `load` > `scan` > `trans`):
//   load  - copy wires and both stripe rows into the shift registers and
//           clear the step counters;
//   scan  - shift wires and both stripe rows together by one position, so
//           the next wire arrives at the decoder (rotation step); wire_idx
//           counts the scan steps and is the number of the wire now at the
//           decoder;
//   trans - shift the left row up and the right row down by one position,
//           which moves every crossing point one stripe down along the wires
//           (translation step); z_off counts the translation steps.
// The decoder (wire_z_decoder, NZ outputs) looks at wire position 0, left
// positions NZ-1-k and right positions k.  Output z_hit[k] at wire_idx = w
// and z_off = t means a crossing point at wire w, distance k + t.  All
// outputs are combinational from the registers and so valid one clock after
// each action.
//
// The principle (scan wires and stripes together, translate by moving the two
// stripe sets in opposite directions, stripes and wires in equal numbers)
// follows the source.  The chamber size, the numbering and the control
// interface are this design's choices.
module wire_z_scanner #(
  parameter int unsigned NW = 16,
  parameter int unsigned NZ = 6,
  localparam int unsigned NS = NW + NZ - 1,
  localparam int unsigned ZW = (NZ > 1) ? $clog2(NZ) : 1,
  localparam int unsigned IW = $clog2(NW + 1),
  localparam int unsigned TW = $clog2(NS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [NW-1:0] wires,
  input  logic [NS-1:0] left,
  input  logic [NS-1:0] right,
  input  logic          scan,
  input  logic          trans,
  output logic          wire_active,  // wire at the decoder has a signal
  output logic [IW-1:0] wire_idx,     // number of that wire
  output logic [TW-1:0] z_off,        // translation steps made
  output logic [NZ-1:0] z_hit,
  output logic          z_valid,
  output logic [ZW-1:0] z_num,
  output logic          z_multi
);
  logic [NW-1:0] wq;
  logic [NS-1:0] lq, rq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wq <= '0; lq <= '0; rq <= '0;
      wire_idx <= '0; z_off <= '0;
    end else if (load) begin
      wq <= wires; lq <= left; rq <= right;
      wire_idx <= '0; z_off <= '0;
    end else if (scan) begin
      wq <= wq >> 1;
      lq <= lq >> 1;
      rq <= rq >> 1;
      wire_idx <= wire_idx + 1'b1;
    end else if (trans) begin
      lq <= lq << 1;
      rq <= rq >> 1;
      z_off <= z_off + 1'b1;
    end
  end

  logic [NZ-1:0] lsel, rsel;
  for (genvar k = 0; k < int'(NZ); k++) begin : g_sel
    assign lsel[k] = lq[NZ - 1 - k];
    assign rsel[k] = rq[k];
  end

  assign wire_active = wq[0];

  wire_z_decoder #(.NZ(NZ)) u_dec (
    .wire_hit(wq[0]), .left(lsel), .right(rsel),
    .z_hit, .z_valid, .z_num, .z_multi);
endmodule
