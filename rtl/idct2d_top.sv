// idct2d_top: sparse 8x8 2-D inverse DCT built around a single 1-D unit.
//
// Z = C X C^T is computed by row-column decomposition, Y = C X then
// Z^T = C Y^T, with one 1-D unit used for both passes (a multiplexed
// structure, no second 1-D unit). Instead of forming whole inner products,
// the unit takes one coefficient at a time and adds its effect to all eight
// outputs of its vector, so zero coefficients are simply never sent: the
// time per block is the number of non-zero inputs plus the number of
// non-zero first-pass results plus a fixed 8 clocks, against 128 clocks for
// a one-sample-per-clock row-column IDCT.
//
//   idct_ctrl      first pass from the core input, then second pass from the
//                  transpose memory, reading only its non-zero words
//   idct_1d        input mux, 4 kernel select logics, 4 multipliers,
//                  8 accumulators (pipeline stages 1-3)
//   write_bus      stage 4: accumulators -> transpose or output memory
//   transpose_mem  first-pass result Y with non-zero flags
//   output_mem     result block Z, one row per write
//
// Interface: in_valid/in_ready handshake for the non-zero input coefficients
// of a block, ordered by column v (u within a column in any order), with
// in_last on the last of each column and in_eob on the last of the block; an
// all-zero block is one zero coefficient with in_last and in_eob set. `done`
// pulses when Z is complete; Z is then read row by row through
// out_rd_row/out_rd_data (asynchronous) and stays valid until the second
// pass of the next block begins, which is no earlier than that block's
// non-zero count plus 4 clocks after its first coefficient is accepted.
// in_ready is low while the second pass of a block reads the transpose
// memory and while the first pass drains. Pixels are OUT_W = 9 bit signed,
// saturated to [-256, 255]. unit_busy is high while a coefficient is inside
// the 1-D unit's pipeline.
module idct2d_top
  import idct_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic signed [IN_W-1:0] in_data,
  input  logic [IDXW-1:0]        in_u,
  input  logic [IDXW-1:0]        in_v,
  input  logic                   in_last,
  input  logic                   in_eob,
  output logic                   done,
  output logic                   unit_busy,   // the 1-D unit holds a coefficient
  input  logic [IDXW-1:0]        out_rd_row,
  output pix_t                   out_rd_data [N]
);

  logic            sel2, x1_valid, x2_valid;
  coef_t           x1, x2;
  logic [N*N-1:0]  tm_nz;
  tword_t          tm_rd_data;
  logic [IDXW-1:0] tm_rd_row, tm_rd_col;
  logic            tm_clear, om_clear, p1_end, p2_end;

  logic            res_valid, res_eob;
  logic [IDXW-1:0] res_vec;
  pass_e           res_pass;
  acc_t            res_acc [N];

  logic            tm_we, om_we;
  logic [IDXW-1:0] tm_col, om_row;
  tword_t          tm_wdata [N];
  pix_t            om_wdata [N];

  idct_ctrl u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data, .in_u, .in_v, .in_last, .in_eob,
    .sel2, .x1_valid, .x1, .x2_valid, .x2,
    .tm_nz, .tm_rd_data, .tm_rd_row, .tm_rd_col, .tm_clear,
    .om_clear, .p1_end, .p2_end, .done
  );

  idct_1d u_1d (
    .clk, .rst_n, .sel2,
    .x1_valid, .x1, .x2_valid, .x2,
    .busy(unit_busy),
    .res_valid, .res_vec, .res_pass, .res_eob, .res_acc
  );

  write_bus u_wbus (
    .res_valid, .res_vec, .res_pass, .res_eob, .res_acc,
    .tm_we, .tm_col, .tm_data(tm_wdata),
    .om_we, .om_row, .om_data(om_wdata),
    .p1_end, .p2_end
  );

  transpose_mem u_tmem (
    .clk, .rst_n, .clear(tm_clear),
    .we(tm_we), .wr_col(tm_col), .wr_data(tm_wdata),
    .rd_row(tm_rd_row), .rd_col(tm_rd_col), .rd_data(tm_rd_data),
    .nz_map(tm_nz)
  );

  output_mem u_omem (
    .clk, .rst_n, .clear(om_clear),
    .we(om_we), .wr_row(om_row), .wr_data(om_wdata),
    .rd_row(out_rd_row), .rd_data(out_rd_data)
  );

endmodule
