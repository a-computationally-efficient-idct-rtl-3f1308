// tb_idct2d_top: end-to-end test of the sparse 8x8 2-D IDCT at its default
// configuration.
//
// Blocks of several kinds (all zero, DC only, sparse low-frequency as left
// by a quantiser, random sparse, fully dense, large values that drive the
// output into saturation, pairs x[0][v] = x[4][v] whose effects cancel in
// four rows of the first-pass result) are sent as streams of their non-zero coefficients,
// column by column, without gaps inside a block; the next block is offered
// at once, so it waits on in_ready while the previous one finishes.
// Every result pixel is compared with Z = C X C^T computed here in double
// precision, rounded and clipped to [-256, 255]; a difference of 1 is
// allowed for the fixed-point arithmetic. The clocks from the first accepted
// coefficient to `done` must be k1 + k2 + 8 (k1 non-zero inputs, k2 non-zero
// first-pass words, worked out here with the datapath's 14+4 fraction-bit
// rounding), or k1 + 5 when the first pass leaves only zeros.
// The test counts how often each mechanism occurred and fails if one never
// did: skipped zero inputs, skipped empty columns, skipped zero words and
// empty rows in the second pass, an all-zero second pass, the subtracting
// side of add/sub, an input stall, output saturation and a block entering
// while the previous one is still in the 1-D unit.
module tb_idct2d_top;
  import idct_pkg::*;
  import idct_ref_pkg::*;

  localparam int NBLK = 600;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, in_last, in_eob, done, unit_busy;
  logic signed [IN_W-1:0] in_data;
  logic [IDXW-1:0] in_u, in_v, out_rd_row;
  pix_t out_rd_data [N];

  always #5 clk = ~clk;

  idct2d_top dut (.*);

  blk_t exp_q[$];
  int   cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int m_zero_in = 0, m_empty_col = 0, m_zero_y = 0, m_empty_row = 0, m_empty_p2 = 0;
  int m_sub = 0, m_stall = 0, m_sat = 0, m_overlap = 0, n_done = 0;

  function automatic int rnd_val(int mag);
    int v;
    do v = $signed($urandom % (2*mag + 1)) - mag; while (v == 0);
    return v;
  endfunction

  function automatic void make_block(int i, ref blk_t b);
    for (int u = 0; u < N; u++) for (int v = 0; v < N; v++) b.x[u][v] = 0;
    case (i % 8)
      0: ;                                                   // all zero
      1: b.x[0][0] = rnd_val(2047);                          // DC only
      2: for (int u = 0; u < 4; u++) for (int v = 0; v < 4 - u; v++)   // low frequencies
           if ($urandom % 2 != 0) b.x[u][v] = rnd_val(300);
      3: for (int k = 0; k < 1 + $urandom % 12; k++)         // random sparse
           b.x[$urandom % N][$urandom % N] = rnd_val(200);
      4: for (int u = 0; u < N; u++) for (int v = 0; v < N; v++)  // dense
           b.x[u][v] = rnd_val(40);
      5: for (int k = 0; k < 1 + $urandom % 4; k++)          // large: saturates
           b.x[$urandom % 3][$urandom % 3] = rnd_val(2047);
      6: for (int u = 0; u < N; u++)                         // odd u only
           b.x[u][$urandom % N] = (u % 2 != 0) ? rnd_val(100) : 0;
      default: for (int v = 0; v < N; v++)                   // x[0][v] = x[4][v]: rows 1,2,5,6 of Y vanish
           if ($urandom % 2 != 0) begin b.x[0][v] = rnd_val(500); b.x[4][v] = b.x[0][v]; end
    endcase
  endfunction

  // driver
  int t_first [$];
  initial begin
    in_valid = 0; in_last = 0; in_eob = 0; in_data = '0; in_u = '0; in_v = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < NBLK; i++) begin
      blk_t b;
      int lastcol, sent;
      make_block(i, b);
      model(b);
      exp_q.push_back(b);
      m_zero_in   += N*N - b.k1;
      m_empty_col += (b.k1 == 0) ? 0 : b.empty_cols;
      m_zero_y    += N*N - b.k2;
      m_empty_row += (b.k2 == 0) ? 0 : b.empty_rows;
      if (b.k2 == 0) m_empty_p2++;
      if (b.sat != 0) m_sat++;
      for (int u = 1; u < N; u += 2) for (int v = 0; v < N; v++) if (b.x[u][v] != 0) m_sub++;
      lastcol = 0;
      for (int v = 0; v < N; v++) for (int u = 0; u < N; u++) if (b.x[u][v] != 0) lastcol = v;
      sent = 0;
      for (int v = 0; v < N; v++) begin
        int us [$];
        us.delete();
        for (int u = 0; u < N; u++) if (b.x[u][v] != 0) us.push_back(u);
        if (b.k1 == 0 && v == 0) us.push_back(0);      // an all-zero block is one zero coefficient
        us.shuffle();
        foreach (us[j]) begin
          in_valid = 1;
          in_u = IDXW'(us[j]); in_v = IDXW'(v);
          in_data = IN_W'(b.x[us[j]][v]);
          in_last = (j == us.size() - 1);
          in_eob  = in_last && (v == lastcol);
          #1;
          while (!in_ready) begin m_stall++; @(negedge clk); #1; end
          if (sent == 0) begin
            t_first.push_back(cyc);
            if (unit_busy) m_overlap++;
          end
          sent++;
          @(negedge clk);
        end
        if (b.k1 == 0 || v == lastcol) break;
      end
      in_valid = 0;
    end
  end

  // checker: read the result block as soon as `done` pulses
  initial begin
    out_rd_row = '0;
    forever begin
      @(negedge clk);
      if (rst_n && done) begin
        blk_t b;
        int t0, cycles, exp_cycles;
        int mech [9];
        n_done++;
        checks++;
        if (exp_q.size() == 0 || t_first.size() == 0) begin
          failures++; $display("FAIL done without a block");
        end else begin
          b  = exp_q.pop_front();
          t0 = t_first.pop_front();
          cycles = cyc - t0 + 1;
          exp_cycles = (b.k2 == 0) ? ((b.k1 == 0 ? 1 : b.k1) + 5) : b.k1 + b.k2 + 8;
          if (cycles != exp_cycles) begin
            failures++; $display("FAIL block %0d: %0d clocks, expected %0d (k1 %0d k2 %0d)",
                                 n_done, cycles, exp_cycles, b.k1, b.k2);
          end
          for (int r = 0; r < N; r++) begin
            out_rd_row = IDXW'(r);
            #0.5;
            for (int c = 0; c < N; c++) begin
              int d;
              d = int'(out_rd_data[c]) - b.z[r][c];
              checks++;
              if (d > 1 || d < -1) begin
                failures++;
                $display("FAIL block %0d Z[%0d][%0d] = %0d, expected %0d", n_done, r, c, out_rd_data[c], b.z[r][c]);
              end
            end
          end
        end
        if (n_done == NBLK) begin
          mech = '{m_zero_in, m_empty_col, m_zero_y, m_empty_row, m_empty_p2, m_sub, m_stall, m_sat, m_overlap};
          $display("skipped zero inputs %0d, skipped empty columns %0d, skipped zero first-pass words %0d,",
                   m_zero_in, m_empty_col, m_zero_y);
          $display("skipped empty rows %0d, empty second passes %0d, subtracted products %0d,",
                   m_empty_row, m_empty_p2, m_sub);
          $display("input stall clocks %0d, saturating blocks %0d, overlapped block starts %0d",
                   m_stall, m_sat, m_overlap);
          foreach (mech[k]) begin
            checks++;
            if (mech[k] == 0) begin failures++; $display("FAIL mechanism %0d never happened", k); end
          end
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

  initial begin
    repeat (NBLK * 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog, %0d blocks done", n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
