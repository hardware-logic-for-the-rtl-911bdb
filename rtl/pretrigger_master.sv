// pretrigger_master: pre-trigger generator with the busy master flip-flop and
// the pre-trigger rate scaler.
//
// The fast condition (for example "at least one track" in coincidence with
// the counter) produces a one-clock pre-trigger pulse only while the system is
// not busy; the same pulse sets the busy master flip-flop, so the busy
// condition only has to gate the pre-trigger itself.  Rejecting or ending an
// event is nothing more than clearing the master (`clear`).  A scaler counts
// pre-triggers and another counts fast conditions that arrived while busy, so
// that the rate can be watched for overcrowding.
//
// Timing: a condition seen in cycle t gives pretrigger = 1 and busy = 1 in
// cycle t+1.  A clear in cycle t makes busy = 0 in cycle t+1; the condition is
// evaluated against the registered busy, so clear and a new condition in the
// same cycle do not start a new event.  The scalers saturate.  Registered
// outputs, asynchronous active-low reset: this design's choices.
module pretrigger_master #(
  parameter int unsigned RATE_W = 24
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cond,        // fast pre-trigger condition
  input  logic              clear,       // reject or end of busy
  output logic              pretrigger,  // one-clock strobe
  output logic              busy,        // master flip-flop
  output logic [RATE_W-1:0] pretrig_count,
  output logic [RATE_W-1:0] lost_count   // conditions seen while busy (rising edges)
);
  logic cond_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pretrigger    <= 1'b0;
      busy          <= 1'b0;
      cond_q        <= 1'b0;
      pretrig_count <= '0;
      lost_count    <= '0;
    end else begin
      cond_q     <= cond;
      pretrigger <= cond & ~busy;
      if (cond & ~busy)      busy <= 1'b1;
      else if (clear)        busy <= 1'b0;
      if (cond & ~busy && pretrig_count != '1) pretrig_count <= pretrig_count + 1'b1;
      if (cond & ~cond_q & busy && lost_count != '1) lost_count <= lost_count + 1'b1;
    end
  end
endmodule
