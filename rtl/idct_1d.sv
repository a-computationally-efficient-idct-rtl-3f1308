// idct_1d: the single 8-point 1-D IDCT unit (pipeline stages 1 to 3),
// time-shared between the first and the second 1-D pass.
//
// Coefficients arrive one per clock, only the non-zero ones. A coefficient
// X[u][v] touches only the u-th kernel column: for n = 0..7 it adds
// C[n][u]*X[u][v] to output Y[n][v]. Four kernel select logics give the
// upper half of that column, four multipliers form the products and eight
// accumulators collect them; the lower half of the column comes from the
// symmetry C[7-n][u] = (-1)^u C[n][u] in the add/sub accumulators.
//
//   stage 1: input multiplexer (first pass from the core input, second pass
//            from the transpose memory), kernel select, operand registers
//   stage 2: four multipliers
//   stage 3: eight accumulators
//
// When the coefficient flagged `last` of a vector leaves stage 3, res_valid
// is high for one clock and res_acc holds the eight outputs Y[0..7][vec]
// (TFRAC+CFRAC fraction bits); the write bus stores them in the next clock.
// A new vector may follow without a gap. Latency: input to res_valid is 3
// clocks. The unit never stalls. Structure and stage split follow the
// architecture; the names and the valid/first/last sideband are this
// design's.
module idct_1d
  import idct_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  sel2,         // 1: take the second-pass input
  input  logic  x1_valid,     // first-pass coefficient (core input)
  input  coef_t x1,
  input  logic  x2_valid,     // second-pass coefficient (transpose memory)
  input  coef_t x2,
  output logic  busy,         // a coefficient is inside stages 1..3
  output logic  res_valid,
  output logic [IDXW-1:0] res_vec,
  output pass_e res_pass,
  output logic  res_eob,
  output acc_t  res_acc [N]
);

  // ---------------- stage 1: input mux and kernel select ----------------
  coef_t             in_c;
  logic              in_v;
  logic signed [CW-1:0] ksl_out [NH];

  always_comb begin
    in_c = sel2 ? x2 : x1;
    in_v = sel2 ? x2_valid : x1_valid;
  end

  for (genvar k = 0; k < NH; k++) begin : g_ksl
    ksl #(.ROW(k)) u_ksl (.u(in_c.u), .coef(ksl_out[k]));
  end

  coef_t                s1;
  logic                 s1_v;
  logic signed [CW-1:0] s1_k [NH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_v <= 1'b0;
    else        s1_v <= in_v;
  end

  always_ff @(posedge clk) begin
    if (in_v) begin
      s1   <= in_c;
      s1_k <= ksl_out;
    end
  end

  // ---------------- stage 2: multipliers ----------------
  coef_t             s2;
  logic              s2_v;
  logic signed [PW-1:0] prod [NH];

  for (genvar k = 0; k < NH; k++) begin : g_mult
    idct_mult u_mult (.clk, .en(s1_v), .a(s1.data), .b(s1_k[k]), .p(prod[k]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s2_v <= 1'b0;
    else        s2_v <= s1_v;
  end

  always_ff @(posedge clk) begin
    if (s1_v) s2 <= s1;
  end

  // ---------------- stage 3: accumulators ----------------
  logic            s3_v, s3_last, s3_eob;
  logic [IDXW-1:0] s3_vec;
  pass_e           s3_pass;

  for (genvar k = 0; k < NH; k++) begin : g_acc
    acc_pair u_acc (
      .clk, .rst_n,
      .en     (s2_v),
      .first  (s2.first),
      .odd    (s2.u[0]),
      .p      (prod[k]),
      .acc_add(res_acc[k]),
      .acc_as (res_acc[N-1-k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s3_v <= 1'b0;
    else        s3_v <= s2_v;
  end

  always_ff @(posedge clk) begin
    if (s2_v) begin
      s3_last <= s2.last;
      s3_eob  <= s2.eob;
      s3_vec  <= s2.vec;
      s3_pass <= s2.pass;
    end
  end

  assign res_valid = s3_v && s3_last;
  assign res_vec   = s3_vec;
  assign res_pass  = s3_pass;
  assign res_eob   = s3_eob;
  assign busy      = s1_v || s2_v || s3_v;

endmodule
