// event_memory: memory strobe gates and memory flip-flops for one group of
// detector channels, organised as a shift register.
//
// When `load` (the pre-trigger) is high the gates copy all W inputs into the
// flip-flops in one clock.  The static outputs `q` are available to the
// trigger logic while the event is analysed.  For read-out, every `shift`
// moves the contents down by one word of WORD_W bits (zeros enter at the top)
// and `word` is the lowest word, so the event leaves in ceil(W/WORD_W)
// shifts, channel 0 first.  load has priority over shift.  Loading only on
// the pre-trigger follows the source; the word-wide shift is this design's
// choice for the read-out.
module event_memory #(
  parameter int unsigned W      = trig_pkg::N_WIRES,
  parameter int unsigned WORD_W = trig_pkg::WORD_W,
  localparam int unsigned NWORD = (W + WORD_W - 1) / WORD_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [W-1:0]      din,
  input  logic              shift,
  output logic [W-1:0]      q,
  output logic [WORD_W-1:0] word
);
  localparam int unsigned WP = NWORD * WORD_W;
  logic [WP-1:0] mem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     mem <= '0;
    else if (load)  mem <= WP'(din);
    else if (shift) mem <= mem >> WORD_W;
  end

  assign q    = mem[W-1:0];
  assign word = mem[WORD_W-1:0];
endmodule
