// output_mem: the 8x8 result block of the 2-D IDCT.
//
// The second pass writes one whole row Z[row][0..7] per clock through the
// write bus. Each row has a "written" flag that is cleared (`clear`) when the
// second pass of a block begins; a row the second pass never writes (its
// input vector was all zero) reads as zero. This lets the second pass skip
// all-zero vectors entirely. Reading is asynchronous: rd_row selects a row,
// rd_data returns its eight pixels. Written data is readable from the clock
// after the write. Only the name and place of this memory are the
// architecture's; the row organisation and the flags are this design's.
module output_mem
  import idct_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            we,
  input  logic [IDXW-1:0] wr_row,
  input  pix_t            wr_data [N],
  input  logic [IDXW-1:0] rd_row,
  output pix_t            rd_data [N]
);

  pix_t       mem [N][N];
  logic [N-1:0] written;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     written <= '0;
    else if (clear) written <= '0;
    else if (we)    written[wr_row] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (we) mem[wr_row] <= wr_data;
  end

  always_comb begin
    for (int c = 0; c < N; c++)
      rd_data[c] = written[rd_row] ? mem[rd_row][c] : '0;
  end

endmodule
