// derand_fifo: derandomizing buffer memory between the event read-out and the
// computer.  Events arrive in bursts at the step clock; the computer empties
// the buffer at its own pace with block transfers.  A plain synchronous FIFO
// of DEPTH words: a write with full = 1 or a read with empty = 1 is ignored
// (the writer waits on full).  rd_data shows the oldest word whenever
// empty = 0 (first-word fall-through); rd_en removes it.  The source names the
// buffer; its depth and the handshake are this design's choices.
module derand_fifo #(
  parameter int unsigned W     = trig_pkg::WORD_W,
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         full,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty,
  output logic [AW:0]  level
);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign full    = (32'(level) == DEPTH);
  assign empty   = (level == '0);
  assign do_wr   = wr_en & ~full;
  assign do_rd   = rd_en & ~empty;
  assign rd_data = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; level <= '0;
    end else begin
      if (do_wr) wp <= (32'(wp) == DEPTH - 1) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (32'(rp) == DEPTH - 1) ? '0 : rp + 1'b1;
      level <= level + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  // the buffer must never be written past full or read past empty
  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n) 32'(level) <= DEPTH);
endmodule
