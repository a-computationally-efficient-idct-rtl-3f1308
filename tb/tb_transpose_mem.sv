// tb_transpose_mem: blocks of random, partly zero columns are written; some
// columns are skipped. Every word of a written column must read back, the
// non-zero map must mark exactly the non-zero words of written columns, and
// `clear` must empty the map.
module tb_transpose_mem;
  import idct_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic clear, we;
  logic [IDXW-1:0] wr_col, rd_row, rd_col;
  tword_t wr_data [N];
  tword_t rd_data;
  logic [N*N-1:0] nz_map;
  longint model [N][N];
  logic [N*N-1:0] nz_exp;

  always #5 clk = ~clk;

  transpose_mem dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; we = 0; wr_col = '0; rd_row = '0; rd_col = '0;
    for (int n = 0; n < N; n++) wr_data[n] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 40; blk++) begin
      clear = 1; @(negedge clk); clear = 0;
      checks++;
      if (nz_map != '0) begin failures++; $display("FAIL clear"); end
      nz_exp = '0;
      for (int c = 0; c < N; c++) begin
        if ($urandom % 3 == 0) continue;   // column not written
        for (int n = 0; n < N; n++) begin
          wr_data[n] = ($urandom % 2 != 0) ? '0 : tword_t'($urandom);
          model[n][c] = longint'(wr_data[n]);
          nz_exp[n*N+c] = (wr_data[n] != '0);
        end
        wr_col = IDXW'(c); we = 1;
        @(negedge clk);
        we = 0;
        for (int n = 0; n < N; n++) begin
          rd_row = IDXW'(n); rd_col = IDXW'(c); #1;
          checks++;
          if (longint'(rd_data) != model[n][c]) begin
            failures++; $display("FAIL read Y[%0d][%0d] got %0d exp %0d", n, c, rd_data, model[n][c]);
          end
        end
        @(negedge clk);
      end
      checks++;
      if (nz_map != nz_exp) begin failures++; $display("FAIL map %h exp %h", nz_map, nz_exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
