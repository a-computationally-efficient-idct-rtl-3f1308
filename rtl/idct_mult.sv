// idct_mult: one multiplier of pipeline stage 2 of the 1-D IDCT unit.
//
// Multiplies the current coefficient (DW bits, TFRAC fraction bits) by the
// kernel element from its kernel select logic (CW bits, CFRAC fraction bits)
// and registers the full-precision product (DW+CW bits, TFRAC+CFRAC fraction
// bits). The result appears one clock after the operands. The multiplier
// itself is the architecture's; the single-cycle registered form is this
// design's choice. The product register is not reset: it is only read when
// the stage valid bit that travels beside it (kept in the 1-D unit) is set.
module idct_mult
  import idct_pkg::*;
(
  input  logic                  clk,
  input  logic                  en,
  input  logic signed [DW-1:0]  a,
  input  logic signed [CW-1:0]  b,
  output logic signed [PW-1:0]  p
);

  always_ff @(posedge clk) begin
    if (en) p <= a * b;
  end

endmodule
