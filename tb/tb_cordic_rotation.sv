// tb_cordic_rotation: self-checking test of the polar-to-Cartesian CORDIC.
// Feeds (envelope, phase) pairs, one per enabled cycle with the clock enable
// high every third cycle: the two envelope levels the transmitter uses (0 and
// 1.0) at random phases, phases at and around the quadrant boundaries, and
// random envelopes up to 1.99. Each result must be within 3 LSB of
// env*cos(ph) and env*sin(ph) computed in real arithmetic, and the first
// result must appear ITER + 2 enabled cycles after the first input.
module tb_cordic_rotation;
  import polar_dsm_pkg::*;

  localparam int unsigned ITER = 16;
  localparam real PI = 3.14159265358979;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ce = 0, in_valid = 0;
  polar_t in_pol = '0;
  logic out_valid;
  iq_t  out_iq;

  cordic_rotation #(.ITER(ITER)) dut (
    .clk(clk), .rst_n(rst_n), .ce(ce), .in_valid(in_valid), .in_pol(in_pol),
    .out_valid(out_valid), .out_iq(out_iq)
  );

  always #5 clk = ~clk;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  polar_t sent [$];
  int n_en = 0, first_out = -1;

  always @(posedge clk) begin
    if (rst_n && ce) begin
      n_en++;
      #1;
      if (out_valid) begin
        polar_t s;
        real a, ei, eq;
        if (first_out < 0) first_out = n_en;
        s  = sent.pop_front();
        a  = real'(s.ph) / 65536.0 * 2.0 * PI;
        ei = real'(s.env) * $cos(a);
        eq = real'(s.env) * $sin(a);
        checks++;
        if (fabs(real'(out_iq.i) - ei) > 3.0 || fabs(real'(out_iq.q) - eq) > 3.0) begin
          failures++;
          $display("FAIL env=%0d ph=%0d got (%0d,%0d) exp (%.1f,%.1f)", s.env, s.ph,
                   out_iq.i, out_iq.q, ei, eq);
        end
      end
    end
  end

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input int env, input int ph);
    @(negedge clk) ce = 1'b0;
    @(negedge clk);
    @(negedge clk);
    in_pol.env = sample_t'(env);
    in_pol.ph  = phase_t'(ph);
    in_valid   = 1'b1;
    ce         = 1'b1;
    sent.push_back(in_pol);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 8; b++) begin
      put(16384, b * 8192);
      put(16384, b * 8192 + 1);
      put(16384, b * 8192 - 1);
    end
    for (int n = 0; n < 2000; n++) put(16384 * int'($urandom_range(0, 1)), int'($urandom_range(0, 65535)));
    for (int n = 0; n < 1000; n++) put(int'($urandom_range(0, 32767)), int'($urandom_range(0, 65535)));
    @(negedge clk);
    in_valid = 1'b0;
    for (int n = 0; n < ITER + 4; n++) begin
      @(negedge clk) ce = 1'b0;
      @(negedge clk) ce = 1'b1;
    end
    @(negedge clk) ce = 1'b0;
    checks++;
    if (first_out != ITER + 2 || sent.size() != 0) begin
      failures++;
      $display("FAIL latency %0d (exp %0d), %0d results missing", first_out, ITER + 2, sent.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
