// theta_z_counter: storing counter with theta selection for the theta-z
// telescopes of both half-circles.
//
// `clear` (the main trigger) empties it.  In every clock with `step` high and
// the step index `z` below ZSCAN (source point inside the scanned z range)
// it adds the number of telescope hits of both halves that lie in the theta
// intervals selected by `theta_sel`; the counter stops at its maximum value
// (2**CW - 1).  The first selected hit is stored as (found, half, z, theta),
// the lowest theta and half 0 winning within one step, so that one origin
// and angle is kept for the read-out.  Registered outputs.
// The block is only named in the source; the saturating count, the scan
// window and the first-hit register are this design's choices.
module theta_z_counter #(
  parameter int unsigned NT    = trig_pkg::N_THETA,
  parameter int unsigned ZW    = 7,                 // width of the step index
  parameter int unsigned ZSCAN = trig_pkg::NZ_IN,   // source positions scanned
  parameter int unsigned CW    = 4,
  localparam int unsigned TW   = $clog2(NT)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          step,
  input  logic [ZW-1:0] z,
  input  logic [NT-1:0] hit0,       // half-circle 0 telescopes
  input  logic [NT-1:0] hit1,       // half-circle 1 telescopes
  input  logic [NT-1:0] theta_sel,  // external control: intervals counted
  output logic [CW-1:0] count,
  output logic          found,
  output logic          found_half,
  output logic [ZW-1:0] found_z,
  output logic [TW-1:0] found_theta
);
  logic [NT-1:0]  s0, s1;
  logic [TW+1:0]  nhit;
  logic [CW:0]    sum;
  logic           any;
  logic           first_half;
  logic [TW-1:0]  first_theta;
  logic           active;

  assign active = step && (32'(z) < ZSCAN);
  assign s0 = hit0 & theta_sel;
  assign s1 = hit1 & theta_sel;

  always_comb begin
    nhit = '0;
    for (int i = 0; i < int'(NT); i++)
      nhit = nhit + (TW+2)'(s0[i]) + (TW+2)'(s1[i]);
    any = |{s0, s1};
    first_half  = 1'b0;
    first_theta = '0;
    for (int i = int'(NT) - 1; i >= 0; i--)
      if (s1[i]) begin first_half = 1'b1; first_theta = TW'(i); end
    for (int i = int'(NT) - 1; i >= 0; i--)
      if (s0[i]) begin first_half = 1'b0; first_theta = TW'(i); end
    sum = (CW+1)'(count) + (CW+1)'(nhit);
    if (32'(nhit) > (1 << CW)) sum = '1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0; found <= 1'b0; found_half <= 1'b0; found_z <= '0; found_theta <= '0;
    end else if (clear) begin
      count <= '0; found <= 1'b0; found_half <= 1'b0; found_z <= '0; found_theta <= '0;
    end else if (active) begin
      count <= sum[CW] ? '1 : sum[CW-1:0];
      if (any && !found) begin
        found       <= 1'b1;
        found_half  <= first_half;
        found_z     <= z;
        found_theta <= first_theta;
      end
    end
  end
endmodule
