// tb_acc_pair: random vectors of products with random u parity. The "add"
// accumulator must hold the sum of the vector's products and the "add/sub"
// accumulator the sum with odd-u products negated; `first` restarts both.
module tb_acc_pair;
  import idct_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic en, first, odd;
  logic signed [PW-1:0] p;
  acc_t acc_add, acc_as;
  longint m_add, m_as;

  always #5 clk = ~clk;

  acc_pair dut (.clk, .rst_n, .en, .first, .odd, .p, .acc_add, .acc_as);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; first = 0; odd = 0; p = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (acc_add != 0 || acc_as != 0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int vec = 0; vec < 300; vec++) begin
      int len = 1 + ($urandom % 8);
      for (int i = 0; i < len; i++) begin
        logic signed [PW-1:0] pv;
        pv    = (vec % 3 == 0) ? PW'($signed(($urandom % 2000)) - 1000) : {$urandom, $urandom} >>> 3;
        p     = pv;
        odd   = $urandom % 2;
        first = (i == 0);
        en    = 1;
        if (i == 0) begin m_add = 0; m_as = 0; end
        m_add += longint'(pv);
        m_as  += odd ? -longint'(pv) : longint'(pv);
        @(negedge clk);
        // an idle cycle now and then: accumulators must hold
        if ($urandom % 4 == 0) begin
          en = 0; p = PW'($urandom); first = 1;
          @(negedge clk);
        end
      end
      en = 0;
      checks++;
      if (longint'(acc_add) != m_add || longint'(acc_as) != m_as) begin
        failures++;
        $display("FAIL vec %0d add %0d/%0d as %0d/%0d", vec, acc_add, m_add, acc_as, m_as);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
