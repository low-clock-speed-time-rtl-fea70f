// tb_ti_envelope_dsm: self-checking test of the M-branch time-interleaved
// envelope modulator (default M = 4). A clock enable is raised one cycle in
// M; one envelope sample is applied per enabled cycle. An independent
// full-rate integer model of the second-order modulator is stepped M times per
// frame with the held sample, and its M output bits must equal q[0..M-1] one
// enabled cycle later (the latency is checked too). The test covers slowly
// varying envelopes, random envelopes, constant inputs (the bit density must
// equal the input level) and an overdriven envelope that saturates the
// integrators (the sat_seen flag must match the model).
module tb_ti_envelope_dsm;
  import polar_dsm_pkg::*;

  localparam int unsigned M = 4;

  int checks = 0, failures = 0;
  int n_sat = 0;
  logic clk = 0, rst_n = 0, ce = 0, in_valid = 0;
  sample_t env = '0;
  logic out_valid, sat_seen;
  logic [M-1:0] q;

  ti_envelope_dsm #(.M(M)) dut (
    .clk(clk), .rst_n(rst_n), .ce(ce), .in_valid(in_valid), .env(env),
    .out_valid(out_valid), .q(q), .sat_seen(sat_seen)
  );

  always #5 clk = ~clk;

  // full-rate reference model
  int r1 = 0, r2 = 0;
  logic [M-1:0] exp_q;
  bit exp_sat;

  function automatic int clamp(input int v, inout bit s);
    if (v > (1 << 19) - 1) begin s = 1'b1; return (1 << 19) - 1; end
    if (v < -(1 << 19))    begin s = 1'b1; return -(1 << 19); end
    return v;
  endfunction

  task automatic model_frame(input int e);
    int v;
    exp_sat = 1'b0;
    for (int k = 0; k < M; k++) begin
      v = (r2 >= 8192) ? 16384 : 0;
      exp_q[k] = (v != 0);
      r1 = clamp(r1 + e - v, exp_sat);
      r2 = clamp(r2 + r1 - v, exp_sat);
    end
  endtask

  int ones, total;

  // one frame: present env with ce high for one cycle, idle M-1 cycles, check
  task automatic frame(input int e);
    env = sample_t'(e);
    in_valid = 1'b1;
    ce = 1'b1;
    @(posedge clk);
    #1;
    ce = 1'b0;
    model_frame(e);
    // registered output is visible right after the enabled edge
    checks++;
    if (!out_valid || q !== exp_q || sat_seen !== exp_sat) begin
      failures++;
      $display("FAIL env=%0d q=%b exp %b valid=%0b sat=%0b exp %0b", e, q, exp_q, out_valid,
               sat_seen, exp_sat);
    end
    if (sat_seen) n_sat++;
    for (int k = 0; k < M; k++) ones += int'(q[k]);
    total += M;
    repeat (M - 1) @(posedge clk);
    #1;
    // outputs must hold between enabled cycles
    checks++;
    if (q !== exp_q) begin
      failures++;
      $display("FAIL output changed without clock enable");
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1;
    // slowly varying envelope
    for (int n = 0; n < 2000; n++)
      frame(int'(8192.0 + 6000.0 * $sin(2.0 * 3.14159265 * n / 250.0)));
    // random envelope in [0, 1]
    for (int n = 0; n < 2000; n++) frame(int'($urandom_range(0, 16384)));
    // constant levels: bit density must match the level
    for (int lv = 1; lv <= 3; lv++) begin
      ones = 0;
      total = 0;
      for (int n = 0; n < 512; n++) frame(lv * 4096);
      checks++;
      if (ones * 4 < (lv * total) - 8 || ones * 4 > (lv * total) + 8) begin
        failures++;
        $display("FAIL density level %0d/4: %0d of %0d", lv, ones, total);
      end
    end
    // overdriven envelope (1.9): integrators saturate
    for (int n = 0; n < 200; n++) frame(31130);
    checks++;
    if (n_sat == 0) begin
      failures++;
      $display("FAIL saturation never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
