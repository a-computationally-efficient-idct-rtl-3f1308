// tb_output_mem: random rows written in random order, some rows left out.
// Written rows must read back exactly, rows not written since the last
// `clear` must read as zero.
module tb_output_mem;
  import idct_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic clear, we;
  logic [IDXW-1:0] wr_row, rd_row;
  pix_t wr_data [N];
  pix_t rd_data [N];
  int model [N][N];

  always #5 clk = ~clk;

  output_mem dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; we = 0; wr_row = '0; rd_row = '0;
    for (int c = 0; c < N; c++) wr_data[c] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 50; blk++) begin
      clear = 1; @(negedge clk); clear = 0;
      for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) model[r][c] = 0;
      for (int k = 0; k < 6; k++) begin
        int r = $urandom % N;
        for (int c = 0; c < N; c++) begin
          wr_data[c] = pix_t'($urandom);
          model[r][c] = int'(wr_data[c]);
        end
        wr_row = IDXW'(r); we = 1;
        @(negedge clk);
        we = 0;
      end
      for (int r = 0; r < N; r++) begin
        rd_row = IDXW'(r); #1;
        for (int c = 0; c < N; c++) begin
          checks++;
          if (int'(rd_data[c]) != model[r][c]) begin
            failures++; $display("FAIL Z[%0d][%0d] %0d exp %0d", r, c, rd_data[c], model[r][c]);
          end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
