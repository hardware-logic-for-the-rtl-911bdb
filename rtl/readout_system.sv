// readout_system: read-out of an accepted event into the derandomizing
// buffer, ending with the end-of-busy signal.
//
// A `start` pulse (start read-out from the decision box) sends one event
// record to the buffer, one word per clock while the buffer is not full (the
// read-out waits while `full` is high):
//   word 0   : {4'hE, event number[11:0]}
//   word 1   : track count in phi (zero-extended)
//   word 2   : {theta-z count[3:0], found, half, z[4:0], theta[4:0]}
//   words 3..: the wire memory, NWW words, wire 0 in bit 0 of the first word
//   then     : the stripe memory, NSW words
// The memories are shift registers: `wire_shift` / `stripe_shift` move the
// next word into place after each word is written.  When the last word is
// written, `end_busy` pulses for one clock.  The record layout is this
// design's choice; the source gives only the read-out path and the
// end-of-busy signal.
module readout_system
  import trig_pkg::*;
#(
  parameter int unsigned NWW = ceil_div(N_WIRES, WORD_W),
  parameter int unsigned NSW = ceil_div(N_STRIPES, WORD_W),
  localparam int unsigned NHDR = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [7:0]        track_count,
  input  logic [3:0]        tz_count,
  input  logic              tz_found,
  input  logic              tz_half,
  input  logic [4:0]        tz_z,
  input  logic [4:0]        tz_theta,
  input  logic [WORD_W-1:0] wire_word,
  input  logic [WORD_W-1:0] stripe_word,
  output logic              wire_shift,
  output logic              stripe_shift,
  input  logic              full,
  output logic              wr_en,
  output logic [WORD_W-1:0] wr_data,
  output logic              end_busy,
  output logic              active
);
  typedef enum logic [1:0] {S_IDLE, S_HDR, S_WIRE, S_STRIPE} state_t;
  state_t      state;
  logic [7:0]  n;       // word index inside the current section
  logic [11:0] evno;
  logic        last;

  always_comb begin
    wr_en        = 1'b0;
    wr_data      = '0;
    wire_shift   = 1'b0;
    stripe_shift = 1'b0;
    last         = 1'b0;
    unique case (state)
      S_IDLE: ;
      S_HDR: begin
        wr_en = 1'b1;
        unique case (n)
          8'd0:    wr_data = {4'hE, evno};
          8'd1:    wr_data = WORD_W'(track_count);
          default: wr_data = {tz_count, tz_found, tz_half, tz_z, tz_theta};
        endcase
      end
      S_WIRE: begin
        wr_en      = 1'b1;
        wr_data    = wire_word;
        wire_shift = ~full;
      end
      S_STRIPE: begin
        wr_en        = 1'b1;
        wr_data      = stripe_word;
        stripe_shift = ~full;
        last         = (32'(n) == NSW - 1);
      end
    endcase
  end

  assign active = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      n        <= '0;
      evno     <= '0;
      end_busy <= 1'b0;
    end else begin
      end_busy <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin state <= S_HDR; n <= '0; end
        S_HDR: if (!full) begin
          if (32'(n) == NHDR - 1) begin state <= S_WIRE; n <= '0; end
          else n <= n + 1'b1;
        end
        S_WIRE: if (!full) begin
          if (32'(n) == NWW - 1) begin state <= S_STRIPE; n <= '0; end
          else n <= n + 1'b1;
        end
        S_STRIPE: if (!full) begin
          if (last) begin
            state    <= S_IDLE;
            n        <= '0;
            evno     <= evno + 1'b1;
            end_busy <= 1'b1;
          end else n <= n + 1'b1;
        end
      endcase
    end
  end
endmodule
