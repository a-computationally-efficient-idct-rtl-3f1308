// write_bus: pipeline stage 4 path from the eight accumulators to the two
// memories.
//
// When the 1-D unit finishes a vector, all eight accumulator values are
// placed on the bus together and written in the same clock:
//   first pass  -> transpose memory, column `vec`; each value is rounded from
//                  TFRAC+CFRAC to TFRAC fraction bits and saturated to DW bits
//   second pass -> output memory, row `vec`; each value is rounded to an
//                  integer and saturated to [-2^(OUT_W-1), 2^(OUT_W-1)-1]
// Rounding adds half an LSB and truncates (round half up). The bus also
// reports the end of each pass (p1_end / p2_end) to the controller; the
// memories capture the data at the clock edge that ends this cycle.
// The bus, its two destinations and its place in stage 4 follow the
// architecture; the word-parallel bus, the rounding and the saturation are
// this design's choices.
module write_bus
  import idct_pkg::*;
(
  input  logic            res_valid,
  input  logic [IDXW-1:0] res_vec,
  input  pass_e           res_pass,
  input  logic            res_eob,
  input  acc_t            res_acc [N],
  output logic            tm_we,
  output logic [IDXW-1:0] tm_col,
  output tword_t          tm_data [N],
  output logic            om_we,
  output logic [IDXW-1:0] om_row,
  output pix_t            om_data [N],
  output logic            p1_end,
  output logic            p2_end
);

  localparam int SH1 = CFRAC;          // drop to TFRAC fraction bits
  localparam int SH2 = CFRAC + TFRAC;  // drop to an integer

  function automatic tword_t round1(acc_t a);
    acc_t r;
    r = (a + (acc_t'(1) <<< (SH1-1))) >>> SH1;
    if (r > acc_t'(2**(DW-1)-1))        return tword_t'(2**(DW-1)-1);
    else if (r < -acc_t'(2**(DW-1)))    return tword_t'(-(2**(DW-1)));
    else                                return tword_t'(r);
  endfunction

  function automatic pix_t round2(acc_t a);
    acc_t r;
    r = (a + (acc_t'(1) <<< (SH2-1))) >>> SH2;
    if (r > acc_t'(2**(OUT_W-1)-1))     return pix_t'(2**(OUT_W-1)-1);
    else if (r < -acc_t'(2**(OUT_W-1))) return pix_t'(-(2**(OUT_W-1)));
    else                                return pix_t'(r);
  endfunction

  always_comb begin
    tm_we  = res_valid && (res_pass == PASS_ROW1);
    om_we  = res_valid && (res_pass == PASS_COL2);
    tm_col = res_vec;
    om_row = res_vec;
    p1_end = tm_we && res_eob;
    p2_end = om_we && res_eob;
    for (int n = 0; n < N; n++) begin
      tm_data[n] = round1(res_acc[n]);
      om_data[n] = round2(res_acc[n]);
    end
  end

endmodule
