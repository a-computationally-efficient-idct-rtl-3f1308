// acc_pair: the two accumulator registers behind one multiplier (pipeline
// stage 3 of the 1-D IDCT unit).
//
// Multiplier k forms P = C[k][u] * X[u][v]. Its product contributes +P to
// output row k, and, through the kernel's symmetry C[N-1-k][u] =
// (-1)^u C[k][u], +P (u even) or -P (u odd) to output row N-1-k. So one
// accumulator always adds ("add") and the other adds or subtracts by the
// parity of u ("add/sub"), as in the architecture.
//
// Restarting an accumulator for a new input vector is folded into the first
// accumulation: when `first` is set the register loads +/-P instead of
// adding it, which equals clearing to zero and then accumulating, without a
// spare cycle. Registers update on `en` only, one clock after the product.
// Reset clears both registers.
module acc_pair
  import idct_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,      // a valid product is present
  input  logic                 first,   // first coefficient of its vector
  input  logic                 odd,     // u is odd: the add/sub side subtracts
  input  logic signed [PW-1:0] p,
  output acc_t                 acc_add, // output row k
  output acc_t                 acc_as   // output row N-1-k
);

  acc_t pe, base_add, base_as;

  always_comb begin
    pe       = acc_t'(p);
    base_add = first ? '0 : acc_add;
    base_as  = first ? '0 : acc_as;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_add <= '0;
      acc_as  <= '0;
    end else if (en) begin
      acc_add <= base_add + pe;
      acc_as  <= odd ? base_as - pe : base_as + pe;
    end
  end

endmodule
