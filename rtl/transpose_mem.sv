// transpose_mem: holds the first-pass result Y and feeds it back to the
// 1-D unit as second-pass input.
//
// The first pass produces Y one column at a time (all eight rows of column
// `wr_col` in one write). The second pass reads Y row by row, element by
// element, which is the transposition. Beside every word the memory keeps a
// non-zero flag, set when a non-zero value is written and cleared for the
// whole block by `clear`; the flags are presented as the 64-bit map nz_map
// (bit r*8+c belongs to Y[r][c]) so that the controller can read only the
// non-zero words. A column the first pass never writes keeps all its flags
// clear and is never read. Reading is asynchronous (rd_row, rd_col ->
// rd_data); a write is visible from the next clock. The memory and its place
// follow the architecture; the non-zero flags are how this design lets the
// second pass read only non-zero coefficients, as the algorithm requires.
module transpose_mem
  import idct_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              we,
  input  logic [IDXW-1:0]   wr_col,
  input  tword_t            wr_data [N],
  input  logic [IDXW-1:0]   rd_row,
  input  logic [IDXW-1:0]   rd_col,
  output tword_t            rd_data,
  output logic [N*N-1:0]    nz_map
);

  tword_t mem [N][N];

  always_ff @(posedge clk) begin
    if (we)
      for (int r = 0; r < N; r++) mem[r][wr_col] <= wr_data[r];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     nz_map <= '0;
    else if (clear) nz_map <= '0;
    else if (we)
      for (int r = 0; r < N; r++) nz_map[r*N + int'(wr_col)] <= (wr_data[r] != '0);
  end

  assign rd_data = mem[rd_row][rd_col];

endmodule
