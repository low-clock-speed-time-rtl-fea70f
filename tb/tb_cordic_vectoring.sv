// tb_cordic_vectoring: self-checking test of the Cartesian-to-polar CORDIC.
// Feeds random I/Q samples in all four quadrants (plus the axes and small
// vectors), one per enabled cycle with the clock enable high every second
// cycle, and compares each result with sqrt(I^2 + Q^2) and atan2(Q, I)
// computed in real arithmetic: envelope within 3 LSB, phase within 3 LSB of
// the 16-bit binary angle (modulo one turn) plus 0.5 / envelope (in LSB) radians,
// the angle resolution a vector of that length allows. It also checks that the first
// result appears exactly ITER + 2 enabled cycles after the first input.
module tb_cordic_vectoring;
  import polar_dsm_pkg::*;

  localparam int unsigned ITER = 16;
  localparam real PI = 3.14159265358979;

  int checks = 0, failures = 0;
  int quad_seen [4] = '{0, 0, 0, 0};
  logic clk = 0, rst_n = 0, ce = 0, in_valid = 0;
  iq_t  in_iq = '0;
  logic out_valid;
  polar_t out_pol;

  cordic_vectoring #(.ITER(ITER)) dut (
    .clk(clk), .rst_n(rst_n), .ce(ce), .in_valid(in_valid), .in_iq(in_iq),
    .out_valid(out_valid), .out_pol(out_pol)
  );

  always #5 clk = ~clk;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  iq_t sent [$];
  int  n_en = 0, first_out = -1;

  // scoreboard: runs on every enabled edge
  always @(posedge clk) begin
    if (rst_n && ce) begin
      n_en++;
      #1;
      if (out_valid) begin
        iq_t  s;
        real  xi, xq, e_env, e_ph, d;
        if (first_out < 0) first_out = n_en;
        s  = sent.pop_front();
        xi = real'(s.i);
        xq = real'(s.q);
        e_env = $sqrt(xi * xi + xq * xq);
        if (e_env > 32767.0) e_env = 32767.0;
        e_ph = $atan2(xq, xi) / (2.0 * PI) * 65536.0;
        d = real'(out_pol.ph) - e_ph;
        while (d > 32768.0) d -= 65536.0;
        while (d < -32768.0) d += 65536.0;
        checks++;
        if (fabs(real'(out_pol.env) - e_env) > 3.0 || (e_env > 16.0 && fabs(d) > 3.0 + 5216.0 / e_env)) begin
          failures++;
          $display("FAIL in=(%0d,%0d) env=%0d exp %.1f ph=%0d exp %.1f", s.i, s.q,
                   out_pol.env, e_env, out_pol.ph, e_ph);
        end
        quad_seen[{s.q < 0, s.i < 0}]++;
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input int i, input int q);
    @(negedge clk);
    ce = 1'b0;
    @(negedge clk);
    in_iq.i = sample_t'(i);
    in_iq.q = sample_t'(q);
    in_valid = 1'b1;
    ce = 1'b1;
    sent.push_back(in_iq);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    put(16384, 0);
    put(0, 16384);
    put(-16384, 0);
    put(0, -16384);
    put(-16384, -1);
    put(11585, 11585);
    put(20, -7);
    put(32767, 32767);
    put(-32768, -32768);
    for (int n = 0; n < 3000; n++)
      put(int'($urandom_range(0, 65535)) - 32768, int'($urandom_range(0, 65535)) - 32768);
    for (int n = 0; n < 500; n++)
      put(int'($urandom_range(0, 2000)) - 1000, int'($urandom_range(0, 2000)) - 1000);
    // drain
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
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (quad_seen[k] == 0) begin
        failures++;
        $display("FAIL quadrant %0d never exercised", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
