// tb_dsm_branch: self-checking test of one envelope-modulator branch.
// Applies random integrator states (small, near-limit and at the limits) and
// envelope samples and compares the decision bit, the updated state and the
// saturation flag with an independent integer model of one second-order DSM
// step: v = (i2 >= 0.5), i1' = sat(i1 + env - v), i2' = sat(i2 + i1' - v).
module tb_dsm_branch;
  import polar_dsm_pkg::*;

  int checks = 0, failures = 0;
  int n_sat = 0;
  dsm_state_t st_in, st_out;
  sample_t    env;
  logic       q, sat;

  dsm_branch dut (.state_in(st_in), .env(env), .state_out(st_out), .q(q), .sat(sat));

  localparam int LIM_HI = (1 << 19) - 1;
  localparam int LIM_LO = -(1 << 19);

  function automatic int clamp(input int v, output bit s);
    s = 1'b0;
    if (v > LIM_HI) begin s = 1'b1; return LIM_HI; end
    if (v < LIM_LO) begin s = 1'b1; return LIM_LO; end
    return v;
  endfunction

  task automatic step(input int i1, input int i2, input int e);
    int v, n1, n2;
    bit s1, s2;
    st_in.i1 = acc_t'(i1);
    st_in.i2 = acc_t'(i2);
    env      = sample_t'(e);
    #1;
    v  = (i2 >= 8192) ? 16384 : 0;
    n1 = clamp(i1 + e - v, s1);
    n2 = clamp(i2 + n1 - v, s2);
    checks++;
    if (q !== (v != 0) || int'(st_out.i1) != n1 || int'(st_out.i2) != n2 || sat !== (s1 | s2)) begin
      failures++;
      $display("FAIL in=(%0d,%0d) env=%0d got q=%0b (%0d,%0d) sat=%0b exp (%0d,%0d) sat=%0b",
               i1, i2, e, q, st_out.i1, st_out.i2, sat, n1, n2, s1 | s2);
    end
    if (s1 | s2) n_sat++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // ordinary operation
    for (int n = 0; n < 3000; n++)
      step(int'($urandom_range(0, 80000)) - 40000, int'($urandom_range(0, 80000)) - 40000,
           int'($urandom_range(0, 16384)));
    // near and at the integrator limits
    for (int n = 0; n < 500; n++)
      step(LIM_HI - int'($urandom_range(0, 20000)), LIM_HI - int'($urandom_range(0, 40000)),
           int'($urandom_range(0, 32767)));
    for (int n = 0; n < 500; n++)
      step(LIM_LO + int'($urandom_range(0, 20000)), LIM_LO + int'($urandom_range(0, 40000)),
           -int'($urandom_range(0, 32768)));
    step(LIM_HI, LIM_HI, 32767);
    step(LIM_LO, LIM_LO, -32768);
    // exact threshold
    step(0, 8191, 4000);
    step(0, 8192, 4000);
    checks++;
    if (n_sat == 0) begin
      failures++;
      $display("FAIL saturation never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
