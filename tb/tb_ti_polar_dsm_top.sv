// tb_ti_polar_dsm_top: end-to-end test of the time-interleaved polar DSM
// transmitter baseband at its default size (M = 4 branches, 16 CORDIC
// iterations; no parameter is overridden).
//
// Stimulus: a two-tone complex baseband signal (peak magnitude 0.85, tone
// periods of 60 and 23 frames, so the phase turns through all four quadrants
// and the envelope swings between 0.15 and 0.85), one sample per in_strobe,
// followed by a short overdriven burst (magnitude 1.6) that must saturate the
// modulator integrators.
//
// Checks, all against values computed here in real arithmetic:
//   * latency: the first valid output word appears (2*ITER + 5)*M clock
//     cycles after the first sampling edge, and words then come every cycle;
//   * every word with out_env = 1 is a unit vector whose phase equals the phase
//     of the input sample it stems from (that of its frame, or of the previous
//     frame for word 0, since the modulator delays by one output sample);
//     every word with out_env = 0 is zero;
//   * in-band accuracy: the output stream and the sample-and-hold upsampled
//     input are both low-pass filtered (two cascaded 32-sample moving
//     averages); the signal-to-error ratio must exceed MIN_SER_DB;
//   * mechanisms seen at least once: input frames, envelope ones and zeros,
//     a one from every branch position, output phases in all four quadrants,
//     and integrator saturation during the overdrive (and never before it).
module tb_ti_polar_dsm_top;
  import polar_dsm_pkg::*;

  localparam int unsigned M    = 4;    // must match the top's defaults
  localparam int unsigned ITER = 16;
  localparam int unsigned NF   = 3000; // normal frames
  localparam int unsigned NOVR = 100;  // overdriven frames
  localparam real PI = 3.14159265358979;
  localparam real MIN_SER_DB = 30.0;
  localparam int  LAT = (2 * ITER + 5) * M;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  iq_t  in_iq = '0;
  logic in_strobe, out_env, out_valid, dsm_sat;
  iq_t  out_iq;

  ti_polar_dsm_top dut (
    .clk(clk), .rst_n(rst_n), .in_iq(in_iq), .in_strobe(in_strobe),
    .out_iq(out_iq), .out_env(out_env), .out_valid(out_valid), .dsm_sat(dsm_sat)
  );

  always #5 clk = ~clk;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // input sample of frame f
  function automatic iq_t gen(input int f);
    real a1, a2, re, im, g;
    iq_t s;
    a1 = 2.0 * PI * f / 60.0;
    a2 = 2.0 * PI * f / 23.0 + 1.0;
    g  = (f >= NF) ? 1.6 / 0.85 : 1.0;
    re = g * (0.5 * $cos(a1) + 0.35 * $cos(a2));
    im = g * (0.5 * $sin(a1) - 0.35 * $sin(a2));
    s.i = sample_t'($rtoi(re * 16384.0));
    s.q = sample_t'($rtoi(im * 16384.0));
    return s;
  endfunction

  // history and captured output
  iq_t hist [NF + NOVR];
  real yi [NF * M];
  real yq [NF * M];
  int  n_in = 0, n_out = 0;
  longint cyc = 0, first_in_cyc = -1, first_out_cyc = -1, last_out_cyc = -1;
  int  gaps = 0;

  // mechanism counters
  int n_ones = 0, n_zeros = 0, n_sat_normal = 0, n_sat_over = 0;
  int branch_ones [M];
  int quad [4];

  initial begin
    for (int k = 0; k < M; k++) branch_ones[k] = 0;
    for (int k = 0; k < 4; k++) quad[k] = 0;
  end

  // drive: a new sample is set up before every sampling edge
  always @(negedge clk) begin
    if (rst_n && in_strobe) begin
      if (n_in < NF + NOVR) begin
        in_iq = gen(n_in);
        hist[n_in] = in_iq;
      end else begin
        in_iq = '0;
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (in_strobe) begin
        if (first_in_cyc < 0) first_in_cyc = cyc;
        n_in++;
      end
      #1;
      if (dsm_sat) begin
        // the modulator sees frame f about ITER + 3 frames after sampling it
        if (n_in > NF + ITER + 4) n_sat_over++;
        else                      n_sat_normal++;
      end
      if (out_valid && n_out < NF * M) check_word();
    end
  end

  task automatic check_word();
    int  f, j, fp;
    real mag, ph_o, ph_i, d, r_in;
    f = n_out / M;
    j = n_out % M;
    if (first_out_cyc < 0) first_out_cyc = cyc;
    else if (cyc != last_out_cyc + 1) gaps++;
    last_out_cyc = cyc;
    yi[n_out] = real'(out_iq.i) / 16384.0;
    yq[n_out] = real'(out_iq.q) / 16384.0;
    checks++;
    if (out_env) begin
      n_ones++;
      branch_ones[j]++;
      mag  = $sqrt(real'(out_iq.i) ** 2 + real'(out_iq.q) ** 2);
      ph_o = $atan2(real'(out_iq.q), real'(out_iq.i));
      // the modulator delays the envelope by one full-rate sample, so word 0
      // of a frame belongs to the previous input sample
      fp   = (j == 0) ? f - 1 : f;
      ph_i = $atan2(real'(hist[fp].q), real'(hist[fp].i));
      r_in = $sqrt(real'(hist[fp].i) ** 2 + real'(hist[fp].q) ** 2);
      d = ph_o - ph_i;
      while (d > PI) d -= 2.0 * PI;
      while (d < -PI) d += 2.0 * PI;
      quad[{out_iq.q < 0, out_iq.i < 0}]++;
      if (fabs(mag - 16384.0) > 6.0 || fabs(d) > 0.002 + 1.0 / r_in) begin
        failures++;
        $display("FAIL word %0d: out (%0d,%0d) |%.1f| phase err %.5f rad", n_out, out_iq.i,
                 out_iq.q, mag, d);
      end
    end else begin
      n_zeros++;
      if (out_iq.i != 0 || out_iq.q != 0) begin
        failures++;
        $display("FAIL word %0d: envelope bit 0 but out (%0d,%0d)", n_out, out_iq.i, out_iq.q);
      end
    end
    n_out++;
  endtask

  task automatic expect_seen(input string what, input int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  // in-band signal-to-error ratio after two cascaded moving averages
  task automatic in_band_check();
    localparam int L = 32;
    int N;
    real fi1 [], fq1 [], gi1 [], gq1 [];
    real xi, xq, si, sq, ti, tq, ui, uq, vi, vq;
    real ps, pe, ser;
    N = NF * M;
    fi1 = new[N]; fq1 = new[N]; gi1 = new[N]; gq1 = new[N];
    // first stage: moving average of output and of the held input (delayed
    // by one output sample, the modulator's signal delay)
    si = 0; sq = 0; ti = 0; tq = 0;
    for (int n = 0; n < N; n++) begin
      xi = (n >= 1) ? real'(hist[(n - 1) / M].i) / 16384.0 : 0.0;
      xq = (n >= 1) ? real'(hist[(n - 1) / M].q) / 16384.0 : 0.0;
      si += yi[n]; sq += yq[n]; ti += xi; tq += xq;
      if (n >= L) begin
        si -= yi[n - L]; sq -= yq[n - L];
        xi = (n - L >= 1) ? real'(hist[(n - L - 1) / M].i) / 16384.0 : 0.0;
        xq = (n - L >= 1) ? real'(hist[(n - L - 1) / M].q) / 16384.0 : 0.0;
        ti -= xi; tq -= xq;
      end
      fi1[n] = si / L; fq1[n] = sq / L; gi1[n] = ti / L; gq1[n] = tq / L;
    end
    // second stage and error power over the settled part
    si = 0; sq = 0; ti = 0; tq = 0; ps = 0; pe = 0;
    for (int n = 0; n < N; n++) begin
      si += fi1[n]; sq += fq1[n]; ti += gi1[n]; tq += gq1[n];
      if (n >= L) begin
        si -= fi1[n - L]; sq -= fq1[n - L]; ti -= gi1[n - L]; tq -= gq1[n - L];
      end
      if (n >= 4 * L) begin
        ui = si / L; uq = sq / L; vi = ti / L; vq = tq / L;
        ps += vi * vi + vq * vq;
        pe += (ui - vi) ** 2 + (uq - vq) ** 2;
      end
    end
    ser = 10.0 * $log10(ps / pe);
    $display("  in-band signal-to-error      %.1f dB", ser);
    checks++;
    if (ser < MIN_SER_DB) begin
      failures++;
      $display("FAIL in-band signal-to-error %.1f dB below %.1f dB", ser, MIN_SER_DB);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (n_in >= NF + NOVR + 2 * ITER + 10);
    repeat (4 * M) @(posedge clk);
    #2;
    checks++;
    if (first_out_cyc - first_in_cyc != LAT || gaps != 0 || n_out != NF * M) begin
      failures++;
      $display("FAIL latency %0d (exp %0d), gaps %0d, words %0d", first_out_cyc - first_in_cyc,
               LAT, gaps, n_out);
    end
    $display("  latency (clock cycles)       %0d", first_out_cyc - first_in_cyc);
    in_band_check();
    $display("mechanisms:");
    expect_seen("input frames", n_in);
    expect_seen("envelope ones", n_ones);
    expect_seen("envelope zeros", n_zeros);
    for (int k = 0; k < M; k++) expect_seen($sformatf("ones from branch %0d", k), branch_ones[k]);
    for (int k = 0; k < 4; k++) expect_seen($sformatf("output phase quadrant %0d", k), quad[k]);
    expect_seen("integrator saturation", n_sat_over);
    checks++;
    if (n_sat_normal != 0) begin
      failures++;
      $display("FAIL saturation at normal input level (%0d frames)", n_sat_normal);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
