// tb_idct_1d: random sparse input vectors, sent back to back through either
// input of the 1-D unit. For every vector the eight results must equal
// sum_u C[n][u] * x[u] over the coefficients sent, with C computed here from
// the cosine formula (rounded to 14 fraction bits), and res_valid must come
// exactly 3 clocks after the vector's last coefficient is presented.
module tb_idct_1d;
  import idct_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic sel2, x1_valid, x2_valid, busy;
  coef_t x1, x2;
  logic res_valid, res_eob;
  logic [IDXW-1:0] res_vec;
  pass_e res_pass;
  acc_t res_acc [N];

  always #5 clk = ~clk;

  idct_1d dut (.clk, .rst_n, .sel2, .x1_valid, .x1, .x2_valid, .x2, .busy,
               .res_valid, .res_vec, .res_pass, .res_eob, .res_acc);

  function automatic longint kern(int n, int uu);
    real cu, v;
    cu = (uu == 0) ? 1.0/$sqrt(2.0) : 1.0;
    v  = 0.5 * cu * $cos((2.0*n + 1.0) * uu * 3.14159265358979323846 / 16.0);
    return longint'($rtoi(v * 16384.0 + (v >= 0 ? 0.5 : -0.5)));
  endfunction

  // expected results, queued per vector with the clock the last one is sent
  typedef struct { longint y[N]; int vec; int pass; int eob; int t_last; } exp_t;
  exp_t q[$];
  int cyc = 0;
  int n_sub = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(negedge clk) if (rst_n && res_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin
      failures++; $display("FAIL unexpected result");
    end else begin
      e = q.pop_front();
      if (cyc - e.t_last != 3) begin
        failures++; $display("FAIL latency %0d", cyc - e.t_last);
      end
      if (int'(res_vec) != e.vec || int'(res_pass) != e.pass || int'(res_eob) != e.eob) begin
        failures++; $display("FAIL sideband vec %0d/%0d", res_vec, e.vec);
      end
      for (int n = 0; n < N; n++) begin
        checks++;
        if (longint'(res_acc[n]) != e.y[n]) begin
          failures++; $display("FAIL vec %0d row %0d got %0d exp %0d", e.vec, n, res_acc[n], e.y[n]);
        end
      end
    end
  end

  task automatic send_vector(int pass, int vec, int eob);
    exp_t e;
    int len;
    logic [N-1:0] used;
    used = '0;
    len = 1 + ($urandom % N);
    for (int n = 0; n < N; n++) e.y[n] = 0;
    e.vec = vec; e.pass = pass; e.eob = eob;
    for (int i = 0; i < len; i++) begin
      coef_t c;
      int uu;
      do uu = $urandom % N; while (used[uu]);
      used[uu] = 1'b1;
      if (uu % 2 != 0) n_sub++;
      c.data  = ($urandom % 5 == 0) ? DW'(2**(DW-1)-1 - ($urandom % 3)) : DW'($signed($urandom % 65536) - 32768);
      c.u     = IDXW'(uu);
      c.vec   = IDXW'(vec);
      c.first = (i == 0);
      c.last  = (i == len-1);
      c.eob   = (i == len-1) && eob;
      c.pass  = pass_e'(pass);
      for (int n = 0; n < N; n++) e.y[n] += longint'(c.data) * kern(n, uu);
      sel2 = (pass == 1);
      if (pass == 1) begin x2 = c; x2_valid = 1; x1_valid = 0; x1 = '0; end
      else           begin x1 = c; x1_valid = 1; x2_valid = 0; x2 = '0; end
      if (i == len-1) begin e.t_last = cyc; q.push_back(e); end
      @(negedge clk);
      // occasional gap inside a vector
      if ($urandom % 5 == 0 && i != len-1) begin
        x1_valid = 0; x2_valid = 0; @(negedge clk);
      end
    end
  endtask

  initial begin
    sel2 = 0; x1_valid = 0; x2_valid = 0; x1 = '0; x2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int b = 0; b < 200; b++)
      for (int v = 0; v < N; v++) send_vector(b % 2, v, v == N-1);
    x1_valid = 0; x2_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (q.size() != 0 || busy) begin failures++; $display("FAIL %0d results missing", q.size()); end
    checks++;
    if (n_sub == 0) begin failures++; $display("FAIL no odd-u coefficient sent"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
