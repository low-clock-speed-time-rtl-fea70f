// tb_one_bit_quantizer: self-checking test of the 1-bit envelope quantizer.
// Sweeps the loop-filter word across the whole integrator range (dense near
// the 0.5 threshold, random elsewhere) and compares the decision bit and the
// selected level with an independent comparison: level 1.0 (16384) when the
// input is at least 0.5 (8192), else 0.
module tb_one_bit_quantizer;
  import polar_dsm_pkg::*;

  int checks = 0, failures = 0;
  acc_t    w;
  logic    q;
  sample_t level;

  one_bit_quantizer dut (.w(w), .q(q), .level(level));

  task automatic check_one(input int val);
    logic    exp_q;
    sample_t exp_l;
    w = acc_t'(val);
    #1;
    exp_q = (val >= 8192);
    exp_l = exp_q ? 16'sd16384 : 16'sd0;
    checks++;
    if (q !== exp_q || level !== exp_l) begin
      failures++;
      $display("FAIL w=%0d q=%0b level=%0d (exp %0b %0d)", val, q, level, exp_q, exp_l);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 8192 - 300; v <= 8192 + 300; v++) check_one(v);
    check_one(-(1 << 19));
    check_one((1 << 19) - 1);
    check_one(0);
    check_one(16384);
    for (int n = 0; n < 2000; n++) check_one(int'($urandom_range(0, (1 << 20) - 1)) - (1 << 19));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
