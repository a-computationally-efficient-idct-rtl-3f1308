// tb_idct_ctrl: the controller alone, with the 1-D unit, write bus and
// transpose memory replaced by simple models in this file. Each block sends
// random non-zero coefficients column by column; the first-pass coefficients
// must reach the unit unchanged (value scaled by 2^4, flags as given). The
// transpose memory model then offers a random non-zero map; the second pass
// must send exactly the marked words in row-major order with the right
// vector index, u, value and first/last/eob flags, must hold off the input
// meanwhile, and `done` must pulse once per block, also for an empty map.
module tb_idct_ctrl;
  import idct_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, in_last, in_eob;
  logic signed [IN_W-1:0] in_data;
  logic [IDXW-1:0] in_u, in_v;
  logic sel2, x1_valid, x2_valid;
  coef_t x1, x2;
  logic [N*N-1:0] tm_nz;
  tword_t tm_rd_data;
  logic [IDXW-1:0] tm_rd_row, tm_rd_col;
  logic tm_clear, om_clear, p1_end, p2_end, done;

  always #5 clk = ~clk;

  idct_ctrl dut (.*);

  // transpose memory model: value depends on the address
  assign tm_rd_data = tword_t'(int'(tm_rd_row) * 100 + int'(tm_rd_col) + 1);

  // pipeline model: a pass ends 4 clocks after its eob coefficient
  logic [3:0] p1_pipe, p2_pipe;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin p1_pipe <= '0; p2_pipe <= '0; end
    else begin
      p1_pipe <= {p1_pipe[2:0], x1_valid && !sel2 && x1.eob};
      p2_pipe <= {p2_pipe[2:0], x2_valid && sel2 && x2.eob};
    end
  assign p1_end = p1_pipe[3];
  assign p2_end = p2_pipe[3];

  int n_done = 0, n_clear = 0, n_empty = 0, n_stall = 0;
  always @(negedge clk) if (rst_n) begin
    if (done) n_done++;
    if (tm_clear) n_clear++;
    if (in_valid && !in_ready) n_stall++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // second-pass checker: the maps of the coming blocks wait in mq; the
  // controller copies the head at tm_clear, which starts that block's
  // expected row-major word list
  logic [N*N-1:0] mq[$];
  int exp_idx[$];
  assign tm_nz = (mq.size() != 0) ? mq[0] : '0;
  always @(negedge clk) if (rst_n && tm_clear) begin
    checks++;
    if (exp_idx.size() != 0 || mq.size() == 0) begin
      failures++; $display("FAIL second pass started with %0d words outstanding", exp_idx.size());
    end
    for (int i = 0; i < N*N; i++) if (mq[0][i]) exp_idx.push_back(i);
    pop_req = 1'b1;
  end
  // the controller copies the map at the clock edge that ends S_LOAD
  logic pop_req = 1'b0;
  always @(posedge clk) if (pop_req) begin
    #1;
    void'(mq.pop_front());
    pop_req = 1'b0;
  end
  always @(negedge clk) if (rst_n && done) begin
    checks++;
    if (exp_idx.size() != 0) begin failures++; $display("FAIL done before the last word"); end
  end

  always @(negedge clk) if (rst_n && x2_valid && sel2) begin
    int i, r, c;
    logic lst, eb;
    checks++;
    if (exp_idx.size() == 0) begin
      failures++; $display("FAIL extra second-pass word t=%0t vec %0d u %0d clears %0d dones %0d", $time, x2.vec, x2.u, n_clear, n_done);
    end else begin
      i = exp_idx.pop_front();
      r = i / N; c = i % N;
      lst = 1'b1; eb = (exp_idx.size() == 0);
      foreach (exp_idx[j]) if (exp_idx[j] / N == r) lst = 1'b0;
      if (int'(x2.vec) != r || int'(x2.u) != c || int'(x2.data) != r*100 + c + 1 ||
          x2.last != lst || x2.eob != eb || x2.pass != PASS_COL2) begin
        failures++; $display("FAIL p2 word r%0d c%0d got vec %0d u %0d last %0d eob %0d", r, c, x2.vec, x2.u, x2.last, x2.eob);
      end
    end
  end

  // first flag of the second pass: set on the first word of each row
  int last_row = -1;
  always @(negedge clk) if (rst_n && x2_valid && sel2) begin
    checks++;
    if (x2.first != (int'(x2.vec) != last_row)) begin
      failures++; $display("FAIL p2 first flag row %0d", x2.vec);
    end
    last_row = x2.last ? -1 : int'(x2.vec);
  end

  task automatic send_block(int nblk);
    logic [N-1:0] cols;
    int lastcol;
    do cols = N'($urandom); while (cols == '0);   // columns that have non-zeros
    for (int v = 0; v < N; v++) if (cols[v]) lastcol = v;
    for (int v = 0; v < N; v++) begin
      logic [N-1:0] used = '0;
      int len;
      if (!cols[v]) continue;
      len = 1 + ($urandom % 4);
      for (int i = 0; i < len; i++) begin
        int uu;
        do uu = $urandom % N; while (used[uu]);
        used[uu] = 1'b1;
        in_valid = 1; in_u = IDXW'(uu); in_v = IDXW'(v);
        in_data = IN_W'($signed($urandom % 4095) - 2047);
        in_last = (i == len-1);
        in_eob  = (i == len-1) && (v == lastcol);
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
        checks++;
        if (!x1_valid || sel2 || x1.data != (tword_t'(in_data) <<< TFRAC) || x1.u != in_u ||
            x1.vec != in_v || x1.last != in_last || x1.eob != in_eob || x1.first != (i == 0) ||
            x1.pass != PASS_ROW1) begin
          failures++; $display("FAIL first-pass word blk %0d v %0d i %0d", nblk, v, i);
        end
        @(negedge clk);
        in_valid = 0;
        if ($urandom % 6 == 0) @(negedge clk);   // gap in the input stream
      end
    end
  endtask

  initial begin
    in_valid = 0; in_last = 0; in_eob = 0; in_data = '0; in_u = '0; in_v = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 300; b++) begin
      logic [N*N-1:0] m;
      case (b % 5)
        0: m = '0;
        1: m = '1;
        default: m = {$urandom, $urandom} & {$urandom, $urandom};
      endcase
      if (m == '0) n_empty++;
      mq.push_back(m);
      send_block(b);
      in_valid = 0;
      // half of the blocks follow at once and wait on in_ready (stall)
      if ($urandom % 2 != 0) while (!in_ready) @(negedge clk);
    end
    repeat (200) @(negedge clk);
    checks++;
    if (n_clear != 300 || n_done != 300 || exp_idx.size() != 0) begin
      failures++; $display("FAIL clear/done count %0d %0d", n_clear, n_done);
    end
    checks++;
    if (n_empty == 0 || n_stall == 0) begin failures++; $display("FAIL empty %0d stall %0d", n_empty, n_stall); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $display("second passes with an empty map: %0d, input stall cycles: %0d", n_empty, n_stall);
    $finish;
  end
endmodule
