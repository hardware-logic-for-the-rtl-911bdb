// decision_box: final accept/reject of an event after the sequential logic.
//
// When `eval` pulses (end of the turn) the event is accepted if every enabled
// requirement holds:
//   track count in phi      : track_count >= trk_min          (always applied)
//   selected phi interval   : some direction in phi_sel       (if use_phi)
//   collinearity            : the angular correlation fired   (if use_copl)
//   theta-z count acceptance: tz_count >= tz_min               (if use_tz)
// The selected theta interval enters through the theta-z counter, which only
// counts the selected intervals.  One clock after eval, exactly one of
// start_readout or reject pulses.  The list of inputs follows the source; the
// enables and the comparison rules are this design's choices.
module decision_box #(
  parameter int unsigned N   = trig_pkg::N_PHI,
  parameter int unsigned TCW = $clog2(trig_pkg::N_PHI + 1),
  parameter int unsigned CW  = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           eval,
  input  logic [TCW-1:0] track_count,
  input  logic [TCW-1:0] trk_min,
  input  logic [N-1:0]   d,
  input  logic [N-1:0]   phi_sel,
  input  logic           use_phi,
  input  logic           copl,
  input  logic           use_copl,
  input  logic [CW-1:0]  tz_count,
  input  logic [CW-1:0]  tz_min,
  input  logic           use_tz,
  output logic           start_readout,
  output logic           reject
);
  logic accept;
  assign accept = (track_count >= trk_min)
                & (~use_phi  | (|(d & phi_sel)))
                & (~use_copl | copl)
                & (~use_tz   | (tz_count >= tz_min));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_readout <= 1'b0;
      reject        <= 1'b0;
    end else begin
      start_readout <= eval &  accept;
      reject        <= eval & ~accept;
    end
  end
endmodule
