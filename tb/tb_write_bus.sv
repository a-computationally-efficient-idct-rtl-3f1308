// tb_write_bus: random accumulator words, spread over the normal range and
// beyond it, go over the bus in both passes. The transpose-memory words must
// be the value / 2^14 rounded half up and saturated to 18 bits, the
// output-memory pixels the value / 2^18 rounded half up and saturated to
// [-256, 255], both worked out here with real arithmetic; the write enables,
// addresses and end-of-pass flags must follow the pass and eob inputs.
module tb_write_bus;
  import idct_pkg::*;

  int checks = 0, failures = 0;
  logic res_valid, res_eob;
  logic [IDXW-1:0] res_vec;
  pass_e res_pass;
  acc_t res_acc [N];
  logic tm_we, om_we, p1_end, p2_end;
  logic [IDXW-1:0] tm_col, om_row;
  tword_t tm_data [N];
  pix_t om_data [N];

  write_bus dut (.*);

  function automatic longint rnd_sat(longint a, int sh, int w);
    real r;
    longint q, hi, lo;
    r  = $floor(real'(a) / real'(longint'(1) << sh) + 0.5);
    q  = longint'(r);
    hi = (longint'(1) << (w-1)) - 1;
    lo = -(longint'(1) << (w-1));
    return q > hi ? hi : (q < lo ? lo : q);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      res_valid = ($urandom % 4) != 0;
      res_eob   = $urandom % 2;
      res_vec   = IDXW'($urandom);
      res_pass  = pass_e'($urandom % 2);
      for (int n = 0; n < N; n++) begin
        longint v;
        case ($urandom % 4)
          0: v = longint'($signed($urandom % 1024)) - 512;                         // near zero, rounding
          1: v = (longint'($signed($urandom % 600)) - 300) <<< 18;                 // around pixel range
          2: v = ((longint'($signed($urandom % 600)) - 300) <<< 18) + (longint'(1) <<< 17); // exact halves
          default: v = $signed({$urandom, $urandom}) >>> 27;                                 // large
        endcase
        res_acc[n] = acc_t'(v);
      end
      #1;
      checks++;
      if (tm_we !== (res_valid && res_pass == PASS_ROW1) || om_we !== (res_valid && res_pass == PASS_COL2) ||
          p1_end !== (tm_we && res_eob) || p2_end !== (om_we && res_eob) ||
          tm_col !== res_vec || om_row !== res_vec) begin
        failures++; $display("FAIL control");
      end
      for (int n = 0; n < N; n++) begin
        checks++;
        if (longint'(tm_data[n]) != rnd_sat(longint'(res_acc[n]), CFRAC, DW) ||
            longint'(om_data[n]) != rnd_sat(longint'(res_acc[n]), CFRAC+TFRAC, OUT_W)) begin
          failures++;
          $display("FAIL %0d: tm %0d/%0d om %0d/%0d", res_acc[n], tm_data[n],
                   rnd_sat(longint'(res_acc[n]), CFRAC, DW), om_data[n], rnd_sat(longint'(res_acc[n]), CFRAC+TFRAC, OUT_W));
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
