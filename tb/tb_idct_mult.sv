// tb_idct_mult: random signed operands, including the extremes, into the
// stage-2 multiplier; the registered product must equal a*b one clock later
// and must hold while `en` is low.
module tb_idct_mult;
  import idct_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  logic en;
  logic signed [DW-1:0] a;
  logic signed [CW-1:0] b;
  logic signed [PW-1:0] p;
  longint expv;

  always #5 clk = ~clk;

  idct_mult dut (.clk, .en, .a, .b, .p);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; a = '0; b = '0;
    @(negedge clk);
    for (int i = 0; i < 500; i++) begin
      case (i)
        0: begin a = DW'(-(2**(DW-1)));  b = CW'(-(2**(CW-1)));  end
        1: begin a = DW'(2**(DW-1)-1);   b = CW'(-(2**(CW-1)));  end
        2: begin a = DW'(-5);            b = 16'sd8035;          end
        default: begin a = DW'($urandom); b = CW'($urandom); end
      endcase
      expv = longint'(a) * longint'(b);
      en = 1;
      @(negedge clk);
      checks++;
      if (longint'(p) != expv) begin
        failures++;
        $display("FAIL %0d * %0d = %0d got %0d", a, b, expv, p);
      end
      // hold with en low
      en = 0; a = DW'($urandom); b = CW'($urandom);
      @(negedge clk);
      checks++;
      if (longint'(p) != expv) begin
        failures++;
        $display("FAIL product not held");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
