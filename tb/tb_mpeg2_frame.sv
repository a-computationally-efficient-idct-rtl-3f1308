// tb_mpeg2_frame: one MPEG-2 frame of each picture type through the IDCT.
//
// A 720x480 frame has 1350 macroblocks of six 8x8 blocks, 8100 blocks. For
// the I, P and B frame the share of non-zero input coefficients is set to
// the averages of a published survey of MPEG-2 streams (24 %, 9 % and 5 %);
// the non-zero coefficients are placed preferably at low frequencies, with
// the probability of position (u, v) falling as exp(-(u+v)/3), as after
// quantisation. Every block is checked against the double-precision
// reference (difference of at most 1). The clocks from the first coefficient
// of the frame to the last `done` are compared with 1 036 800, the time of a
// row-column IDCT that processes one sample per clock in each of its two
// passes, and must stay within the 900 000 clocks that one frame time at
// 30 frames/s gives at 27 MHz. The run prints the normalised time and the
// share of zeros the second pass saw, for each picture type.
module tb_mpeg2_frame;
  import idct_pkg::*;
  import idct_ref_pkg::*;

  localparam int BLOCKS   = 1350 * 6;
  localparam int REF_CLK  = 1350 * 6 * 64 * 2;
  localparam int RT_CLK   = 27_000_000 / 30;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, in_last, in_eob, done, unit_busy;
  logic signed [IN_W-1:0] in_data;
  logic [IDXW-1:0] in_u, in_v, out_rd_row;
  pix_t out_rd_data [N];

  always #5 clk = ~clk;

  idct2d_top dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  blk_t exp_q[$];
  int   n_done = 0;
  real  pnz [N][N];   // probability that X[u][v] is non-zero

  function automatic void set_density(real share);
    real w, sum, c;
    sum = 0.0;
    for (int u = 0; u < N; u++) for (int v = 0; v < N; v++) sum += $exp(-(u + v) / 3.0);
    c = share * 64.0 / sum;
    // scale up until the clipped probabilities reach the wanted share
    for (int it = 0; it < 50; it++) begin
      real tot = 0.0;
      for (int u = 0; u < N; u++) for (int v = 0; v < N; v++) begin
        w = c * $exp(-(u + v) / 3.0);
        pnz[u][v] = (w > 1.0) ? 1.0 : w;
        tot += pnz[u][v];
      end
      c = c * (share * 64.0) / tot;
    end
  endfunction

  function automatic void make_block(ref blk_t b);
    for (int u = 0; u < N; u++) for (int v = 0; v < N; v++) begin
      b.x[u][v] = 0;
      if (real'($urandom % 100000) / 100000.0 < pnz[u][v]) begin
        int mag = 1 + ($urandom % (1 + (255 >> (u + v))));
        b.x[u][v] = ($urandom % 2 != 0) ? mag : -mag;
      end
    end
  endfunction

  task automatic send_block(ref blk_t b);
    int lastcol = 0;
    for (int v = 0; v < N; v++) for (int u = 0; u < N; u++) if (b.x[u][v] != 0) lastcol = v;
    for (int v = 0; v < N; v++) begin
      int us [$];
      for (int u = 0; u < N; u++) if (b.x[u][v] != 0) us.push_back(u);
      if (b.k1 == 0 && v == 0) us.push_back(0);
      foreach (us[j]) begin
        in_valid = 1;
        in_u = IDXW'(us[j]); in_v = IDXW'(v);
        in_data = IN_W'(b.x[us[j]][v]);
        in_last = (j == us.size() - 1);
        in_eob  = in_last && (v == lastcol);
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
        @(negedge clk);
      end
      if (b.k1 == 0 || v == lastcol) break;
    end
    in_valid = 0;
  endtask

  // result checker
  initial begin
    out_rd_row = '0;
    forever begin
      @(negedge clk);
      if (rst_n && done) begin
        blk_t b;
        int d;
        n_done++;
        checks++;
        if (exp_q.size() == 0) begin
          failures++; $display("FAIL done without a block");
        end else begin
          b = exp_q.pop_front();
          for (int r = 0; r < N; r++) begin
            out_rd_row = IDXW'(r);
            #0.5;
            for (int c = 0; c < N; c++) begin
              d = int'(out_rd_data[c]) - b.z[r][c];
              checks++;
              if (d > 1 || d < -1) begin
                failures++;
                $display("FAIL Z[%0d][%0d] = %0d, expected %0d", r, c, out_rd_data[c], b.z[r][c]);
              end
            end
          end
        end
      end
    end
  end

  initial begin
    string name [3] = '{"I", "P", "B"};
    real   share [3] = '{0.24, 0.09, 0.05};   // non-zero share of the input
    real   norm [3];
    in_valid = 0; in_last = 0; in_eob = 0; in_data = '0; in_u = '0; in_v = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < 3; p++) begin
      int t0, t1, k1sum, k2sum, d0;
      set_density(share[p]);
      k1sum = 0; k2sum = 0;
      d0 = n_done;
      t0 = cyc;
      for (int i = 0; i < BLOCKS; i++) begin
        blk_t b;
        make_block(b);
        model(b);
        k1sum += b.k1; k2sum += b.k2;
        exp_q.push_back(b);
        send_block(b);
      end
      while (n_done != d0 + BLOCKS) @(negedge clk);
      t1 = cyc;
      norm[p] = real'(t1 - t0) / real'(REF_CLK);
      $display("%s frame: %0d clocks, normalised %0.3f; zeros in first pass %0.1f %%, in second pass %0.1f %%",
               name[p], t1 - t0, norm[p], 100.0 - 100.0 * k1sum / (64.0 * BLOCKS),
               100.0 - 100.0 * k2sum / (64.0 * BLOCKS));
      checks++;
      if (t1 - t0 > RT_CLK) begin
        failures++; $display("FAIL %s frame exceeds %0d clocks", name[p], RT_CLK);
      end
    end
    checks++;
    if (!(norm[0] > norm[1] && norm[1] > norm[2])) begin
      failures++; $display("FAIL I, P, B times not in falling order");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * RT_CLK) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
