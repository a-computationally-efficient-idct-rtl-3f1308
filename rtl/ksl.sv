// ksl: kernel select logic for one of the upper four rows of the 8x8 IDCT
// kernel.
//
// Given the index u of the incoming coefficient X[u][v], the block outputs
// the kernel element C[ROW][u] (u-th column, row ROW, ROW = 0..3). The
// lower four rows are not stored: C[7-ROW][u] = (-1)^u * C[ROW][u], and the
// add/sub accumulators use that symmetry. Four instances (ROW = 0..3) feed the
// four multipliers. The table is the upper half of the kernel matrix written
// with the seven magnitudes A..G; the fixed-point values are in idct_pkg.
//
// Purely combinational; the 1-D unit registers its output in pipeline
// stage 1.
module ksl
  import idct_pkg::*;
#(
  parameter int unsigned ROW = 0
) (
  input  logic [IDXW-1:0]       u,
  output logic signed [CW-1:0]  coef
);

  always_comb begin
    coef = '0;
    unique case (ROW)
      0: case (u)
           3'd0: coef =  K_A;  3'd1: coef =  K_B;  3'd2: coef =  K_C;  3'd3: coef =  K_D;
           3'd4: coef =  K_A;  3'd5: coef =  K_E;  3'd6: coef =  K_F;  default: coef =  K_G;
         endcase
      1: case (u)
           3'd0: coef =  K_A;  3'd1: coef =  K_D;  3'd2: coef =  K_F;  3'd3: coef = -K_G;
           3'd4: coef = -K_A;  3'd5: coef = -K_B;  3'd6: coef = -K_C;  default: coef = -K_E;
         endcase
      2: case (u)
           3'd0: coef =  K_A;  3'd1: coef =  K_E;  3'd2: coef = -K_F;  3'd3: coef = -K_B;
           3'd4: coef = -K_A;  3'd5: coef =  K_G;  3'd6: coef =  K_C;  default: coef =  K_D;
         endcase
      default: case (u)
           3'd0: coef =  K_A;  3'd1: coef =  K_G;  3'd2: coef = -K_C;  3'd3: coef = -K_E;
           3'd4: coef =  K_A;  3'd5: coef =  K_D;  3'd6: coef = -K_F;  default: coef = -K_B;
         endcase
    endcase
  end

endmodule
