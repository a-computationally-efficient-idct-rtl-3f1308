// idct_pkg: types and constants shared by the sparse 8x8 IDCT.
//
// The transform is computed as Z = C X C^T with the 8x8 cosine kernel
// C[n][u] = 0.5 * c_u * cos((2n+1) u pi / 16), c_0 = 1/sqrt(2), c_u = 1 else.
// Only seven magnitudes occur in the upper half of C (A..G of the kernel
// matrix); they are stored here as signed fixed-point numbers with
// CFRAC fraction bits, already multiplied by the 1/2 in front of the matrix.
//
// Number formats (this design's choice, the source gives no word widths):
//   input coefficient X   : IN_W = 12 bit signed integer (MPEG-2 range)
//   data word into 1-D    : DW   = 18 bit signed, TFRAC = 4 fraction bits
//   kernel element        : CW   = 16 bit signed, CFRAC = 14 fraction bits
//   accumulator           : AW   = DW + CW + 3 bits (sum of 8 products)
//   output pixel Z        : OUT_W = 9 bit signed, saturated to [-256, 255]
package idct_pkg;

  localparam int N     = 8;    // transform size (8x8 blocks)
  localparam int NH    = N/2;  // multipliers / kernel select logics
  localparam int IDXW  = 3;    // width of a row or column index

  localparam int IN_W  = 12;
  localparam int TFRAC = 4;
  localparam int DW    = 18;
  localparam int CW    = 16;
  localparam int CFRAC = 14;
  localparam int PW    = DW + CW;
  localparam int AW    = PW + 3;
  localparam int OUT_W = 9;

  // 0.5*cos(k*pi/16) * 2^CFRAC, rounded, k = 1..7; and 0.5*cos(pi/4)*2^CFRAC
  localparam logic signed [CW-1:0] K_A = 16'sd5793;  // cos(pi/4)
  localparam logic signed [CW-1:0] K_B = 16'sd8035;  // cos(pi/16)
  localparam logic signed [CW-1:0] K_C = 16'sd7568;  // cos(pi/8)
  localparam logic signed [CW-1:0] K_D = 16'sd6811;  // cos(3pi/16)
  localparam logic signed [CW-1:0] K_E = 16'sd4551;  // cos(5pi/16)
  localparam logic signed [CW-1:0] K_F = 16'sd3135;  // cos(3pi/8)
  localparam logic signed [CW-1:0] K_G = 16'sd1598;  // cos(7pi/16)

  // Which pass a coefficient belongs to: the 1-D unit is time-shared.
  typedef enum logic {PASS_ROW1 = 1'b0, PASS_COL2 = 1'b1} pass_e;

  // One coefficient travelling into the 1-D unit.
  //   data  : value, DW bits with TFRAC fraction bits
  //   u     : its index inside the input vector (selects kernel column)
  //   vec   : index of the input vector (column of the block being processed)
  //   first : first coefficient of its vector (accumulators restart)
  //   last  : last coefficient of its vector (result goes out on the write bus)
  //   eob   : last coefficient of the pass
  typedef struct packed {
    logic signed [DW-1:0] data;
    logic [IDXW-1:0]      u;
    logic [IDXW-1:0]      vec;
    logic                 first;
    logic                 last;
    logic                 eob;
    pass_e                pass;
  } coef_t;

  typedef logic signed [AW-1:0]    acc_t;
  typedef logic signed [DW-1:0]    tword_t;
  typedef logic signed [OUT_W-1:0] pix_t;

endpackage
