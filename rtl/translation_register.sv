// translation_register: shift register that translates the stripe image of
// one chamber along z, one stripe per step.
// `load` copies the NZ stripes into positions PAD .. PAD+NZ-1 and clears the
// PAD positions below them.  Each `shift` moves everything one position down
// (zeros enter at the top), so after t shifts position PAD+m holds stripe
// m+t: a telescope wired to fixed positions sees the event as if its source
// point moved one stripe along z per step.  The PAD positions let a telescope
// look at stripes below the source point.  load has priority over shift.
module translation_register #(
  parameter int unsigned NZ  = trig_pkg::NZ_IN,
  parameter int unsigned PAD = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [NZ-1:0]     din,
  input  logic              shift,
  output logic [PAD+NZ-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (load)  q <= {din, {PAD{1'b0}}};
    else if (shift) q <= q >> 1;
  end
endmodule
