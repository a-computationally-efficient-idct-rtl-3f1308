// tb_ksl: checks the four kernel select logics against the kernel
// C[k][u] = 0.5 * c_u * cos((2k+1) u pi / 16) computed here in floating point
// and rounded to 14 fraction bits, and checks the symmetry of the lower half
// of the kernel, C[7-k][u] = (-1)^u C[k][u], against the same formula.
module tb_ksl;
  import idct_pkg::*;

  int checks = 0, failures = 0;
  logic [IDXW-1:0] u;
  logic signed [CW-1:0] coef [NH];

  for (genvar k = 0; k < NH; k++) begin : g_dut
    ksl #(.ROW(k)) dut (.u(u), .coef(coef[k]));
  end

  function automatic int kern(int n, int uu);
    real cu, v;
    cu = (uu == 0) ? 1.0/$sqrt(2.0) : 1.0;
    v  = 0.5 * cu * $cos((2.0*n + 1.0) * uu * 3.14159265358979323846 / 16.0);
    return $rtoi(v * 16384.0 + (v >= 0 ? 0.5 : -0.5));
  endfunction

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int uu = 0; uu < N; uu++) begin
      u = IDXW'(uu);
      #1;
      for (int k = 0; k < NH; k++) begin
        checks++;
        if (int'(coef[k]) != kern(k, uu)) begin
          failures++;
          $display("FAIL row %0d u %0d: got %0d expected %0d", k, uu, coef[k], kern(k, uu));
        end
        // lower half of the column from the symmetry used by add/sub
        checks++;
        if (((uu % 2 != 0) ? -int'(coef[k]) : int'(coef[k])) != kern(N-1-k, uu)) begin
          failures++;
          $display("FAIL symmetry row %0d u %0d", N-1-k, uu);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
