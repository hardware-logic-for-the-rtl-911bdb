// track_counting: track clustering and track counting in phi (the block of
// the small trigger system that combines the cluster condenser and the fast
// counter).
//
// The direction telescopes read from the memory flip-flops are condensed so
// that a cluster of adjacent directions counts as one track, then counted.
// When `strobe` is high the count is compared with the window
// [cnt_min, cnt_max] set by external controls: inside the window the block
// gives the main trigger, outside it gives a reject.  Both outputs and the
// count are registered: they are valid one clock after the strobe.
// The window comparison (rather than the fixed discriminator levels) and the
// one-cycle latency are this design's choices; a ring that is all 1s counts
// as one track.
module track_counting #(
  parameter int unsigned N  = trig_pkg::N_PHI,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  d,          // direction telescopes
  input  logic          strobe,     // evaluate this cycle
  input  logic [CW-1:0] cnt_min,    // external control: fewest tracks accepted
  input  logic [CW-1:0] cnt_max,    // external control: most tracks accepted
  output logic          main_trigger,
  output logic          reject,
  output logic [CW-1:0] track_count
);
  logic [N-1:0]  cl;
  logic          all1;
  logic [CW-1:0] cnt_raw, cnt;
  logic [3:0]    lev_unused;

  cluster_condenser #(.N(N), .WRAP(1'b1)) u_cond (.a(d), .b(cl), .all_ones(all1));
  majority_counter  #(.N(N)) u_cnt (.in(cl), .veto('0), .strobe(strobe),
                                    .count(cnt_raw), .level(lev_unused));

  assign cnt = all1 ? CW'(1) : cnt_raw;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      main_trigger <= 1'b0;
      reject       <= 1'b0;
      track_count  <= '0;
    end else begin
      main_trigger <= strobe & (cnt >= cnt_min) & (cnt <= cnt_max);
      reject       <= strobe & ~((cnt >= cnt_min) & (cnt <= cnt_max));
      if (strobe) track_count <= cnt;
    end
  end
endmodule
