// rotation_pattern_unit: pattern comparison by rotating the event (the
// sequential shifting technique of Section 4.2 / Fig. 7 of the source).
//
// `load` copies the inner and outer wire rings into two circular shift
// registers.  Every `step` rotates both rings by one wire, so after N steps
// the event has turned 360 degrees.  At each step NPAT fixed, wired
// configurations are compared with a window of 2*H+1 wires around position 0
// (and, for configurations that ask for it, with the window around the
// opposite position N/2).  Configuration p matches when
//     OR(inner window & IN_MASK[p]) AND OR(outer window & OUT_MASK[p])
//     [AND the same on the opposite side, if OPP[p]]
// an OR-AND-OR combination like those of the fast logic.  count[p] counts the
// steps at which configuration p matched (saturating); `clear` empties them.
// The same turn also counts the fired wires of each ring as they pass
// position 0 (wire_cnt_in / wire_cnt_out), so after a full turn these hold
// the number of inner and outer wires with a signal.
// Half-circle symmetry: at each step the straight directions
// (inner wire k AND an outer wire within k-1..k+1) are split into the half
// circle starting at position 0 and the other half; sym_count counts the
// steps at which both halves hold a direction.  After a full turn,
// sym_count = N means every orientation of the dividing line has a track on
// each side (no half plane contains all tracks), a momentum balance test.
//
// Default configurations (this design's choice, after the sketches of the
// source): 0 = straight track (inner wire, outer wire +-1), 1 = track curved
// one way (outer wire +2..+4), 2 = track curved the other way (outer wire
// -4..-2), 3 = collinear pair (straight track on both sides of the circle).
// Mask bit H is the window centre; bit H+k is wire offset +k.
module rotation_pattern_unit #(
  parameter int unsigned N    = trig_pkg::N_PHI,
  parameter int unsigned H    = 4,
  parameter int unsigned NPAT = 4,
  parameter logic [2*H:0] IN_MASK  [NPAT] = '{9'b000010000, 9'b000010000,
                                              9'b000010000, 9'b000010000},
  parameter logic [2*H:0] OUT_MASK [NPAT] = '{9'b000111000, 9'b111000000,
                                              9'b000000111, 9'b000111000},
  parameter logic         OPP      [NPAT] = '{1'b0, 1'b0, 1'b0, 1'b1},
  parameter int unsigned  CW = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic [N-1:0]        in_ring,
  input  logic [N-1:0]        out_ring,
  input  logic                clear,
  input  logic                step,
  output logic [NPAT-1:0]     match,
  output logic [CW-1:0]       count [NPAT],
  output logic [$clog2(N+1)-1:0] wire_cnt_in,
  output logic [$clog2(N+1)-1:0] wire_cnt_out,
  output logic [$clog2(N+1)-1:0] sym_count
);
  logic [N-1:0] ri, ro;
  logic [2*H:0] wi, wo, oi, oo;

  for (genvar k = 0; k <= 2 * int'(H); k++) begin : g_win
    localparam int OFF = k - int'(H);
    assign wi[k] = ri[(OFF + int'(N)) % int'(N)];
    assign wo[k] = ro[(OFF + int'(N)) % int'(N)];
    assign oi[k] = ri[(OFF + int'(N) + int'(N) / 2) % int'(N)];
    assign oo[k] = ro[(OFF + int'(N) + int'(N) / 2) % int'(N)];
  end

  for (genvar p = 0; p < int'(NPAT); p++) begin : g_pat
    logic here, there;
    assign here  = (|(wi & IN_MASK[p])) & (|(wo & OUT_MASK[p]));
    assign there = (|(oi & IN_MASK[p])) & (|(oo & OUT_MASK[p]));
    assign match[p] = here & (~OPP[p] | there);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                                   count[p] <= '0;
      else if (clear)                               count[p] <= '0;
      else if (step && match[p] && count[p] != '1)  count[p] <= count[p] + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wire_cnt_in  <= '0;
      wire_cnt_out <= '0;
    end else if (clear) begin
      wire_cnt_in  <= '0;
      wire_cnt_out <= '0;
    end else if (step) begin
      if (ri[0]) wire_cnt_in  <= wire_cnt_in + 1'b1;
      if (ro[0]) wire_cnt_out <= wire_cnt_out + 1'b1;
    end
  end

  logic [N-1:0] dir;
  logic         sym_now;
  for (genvar k = 0; k < int'(N); k++) begin : g_dir
    assign dir[k] = ri[k] & (ro[(k + N - 1) % N] | ro[k] | ro[(k + 1) % N]);
  end
  assign sym_now = (|dir[N/2-1:0]) & (|dir[N-1:N/2]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 sym_count <= '0;
    else if (clear)             sym_count <= '0;
    else if (step && sym_now)   sym_count <= sym_count + 1'b1;
  end

  // rotate by one wire: the wire at position 1 moves to position 0
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ri <= '0;
      ro <= '0;
    end else if (load) begin
      ri <= in_ring;
      ro <= out_ring;
    end else if (step) begin
      ri <= {ri[0], ri[N-1:1]};
      ro <= {ro[0], ro[N-1:1]};
    end
  end
endmodule
