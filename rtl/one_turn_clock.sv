// one_turn_clock: step sequencer of the sequential logic.
// A `start` pulse (the main trigger) begins a turn of NSTEP steps: for NSTEP
// consecutive clocks `step` is high and `idx` counts 0 .. NSTEP-1; in the
// clock after the last step `done` pulses.  A start while running is ignored.
// One step per clock at a 10 MHz clock matches the shift rate the source
// quotes; the step count of a turn (one full rotation of 120 wires) and the
// exact handshake are this design's choices.
module one_turn_clock #(
  parameter int unsigned NSTEP = trig_pkg::N_PHI,
  localparam int unsigned IW   = $clog2(NSTEP)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          step,
  output logic [IW-1:0] idx,
  output logic          done
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step <= 1'b0;
      idx  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!step) begin
        if (start) begin
          step <= 1'b1;
          idx  <= '0;
        end
      end else if (32'(idx) == NSTEP - 1) begin
        step <= 1'b0;
        done <= 1'b1;
      end else begin
        idx <= idx + 1'b1;
      end
    end
  end
endmodule
