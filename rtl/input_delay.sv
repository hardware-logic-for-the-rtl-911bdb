// input_delay: the delay stage in front of the memory strobe gates.
// In the source each chamber signal passes a one-shot delay so that it is
// still present when the pre-trigger, which needs a few hundred ns to form,
// opens the memory gates.  Here the signals are sampled by the step clock and
// delayed by DELAY clocks in a register pipeline; DELAY must equal the
// latency of the pre-trigger (one clock in this design).  DELAY = 0 passes
// the signals through.  Reset clears the pipeline.
module input_delay #(
  parameter int unsigned W     = trig_pkg::N_WIRES + trig_pkg::N_STRIPES,
  parameter int unsigned DELAY = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  if (DELAY == 0) begin : g_none
    assign dout = din;
  end else begin : g_pipe
    logic [W-1:0] pipe [DELAY];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(DELAY); i++) pipe[i] <= '0;
      end else begin
        pipe[0] <= din;
        for (int i = 1; i < int'(DELAY); i++) pipe[i] <= pipe[i-1];
      end
    end
    assign dout = pipe[DELAY-1];
  end
endmodule
