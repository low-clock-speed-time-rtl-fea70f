// tb_ofdm_sndr_workload: in-band SNDR of the transmitter baseband for an
// OFDM signal of the 7.68 MHz LTE class, with 1, 2 and 4 branches side by
// side.
//
// One clock stands for the output rate f_s = 245.76 MHz. Three tops run from
// it: M = 1 (input at 245.76 MS/s, OSR 32), M = 2 (122.88 MS/s) and M = 4
// (61.44 MS/s, OSR 8 at the input). Each samples the same continuous-time
// test signal at its own input rate.
//
// The signal has 38 QPSK subcarriers, 120 kHz apart, occupying +-2.28 MHz
// (about the 4.5 MHz occupied by an LTE carrier sampled at 7.68 MS/s), with a
// random phase per subcarrier. Its period is exactly N = 4096 output
// samples, and it is scaled to a peak magnitude of 0.95. It stands in for an
// LTE waveform; it is not a standard LTE frame.
//
// For each design, N consecutive settled output words are transformed with a
// DFT at the in-band bins (|f| <= 3.84 MHz, bins -64..64, the whole
// 7.68 MHz channel). The reference spectrum is the ideal signal, delayed by
// 1 + (M-1)/2 output samples: the modulator delay plus the centre of the
// sample-and-hold. A least-squares
// complex gain g is fitted, and SNDR = sum|g X|^2 / sum|Y - g X|^2 over
// those bins.
//
// Each SNDR must reach MIN_SNDR_DB, and the three results must lie within
// MAX_SPREAD_DB of each other, since interleaving should not degrade the
// SNDR. Every output word must also be a zero or unit vector (two-level
// envelope).
module tb_ofdm_sndr_workload;
  import polar_dsm_pkg::*;

  localparam int  N     = 4096;   // DFT length (= signal period in output samples)
  localparam int  NSC   = 19;     // subcarriers per side
  localparam int  SPC   = 2;      // subcarrier spacing in DFT bins
  localparam int  KBAND = 64;     // in-band bins per side (3.84 MHz)
  localparam int  SKIP  = 1024;   // settling words before the capture
  localparam real PI    = 3.14159265358979;
  localparam real MIN_SNDR_DB   = 32.0;
  localparam real MAX_SPREAD_DB = 3.0;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ---------------- test signal ----------------
  real sc_ph [2 * NSC];          // subcarrier phases
  int  sc_bin [2 * NSC];         // subcarrier bins
  real scale;                    // peak normalisation
  real cos_t [N], sin_t [N];     // one-turn tables

  // ideal signal at output-rate index t (periodic in N)
  task automatic sig(input int t, output real re, output real im);
    int a;
    re = 0.0; im = 0.0;
    for (int s = 0; s < 2 * NSC; s++) begin
      a = ((sc_bin[s] * t) % N + N) % N;
      re += $cos(2.0 * PI * a / N + sc_ph[s]);
      im += $sin(2.0 * PI * a / N + sc_ph[s]);
    end
    re *= scale; im *= scale;
  endtask

  real xr [N], xi [N];           // one period of the ideal signal

  initial begin
    real re, im, pk;
    for (int s = 0; s < NSC; s++) begin
      sc_bin[s]       = SPC * (s + 1);
      sc_bin[NSC + s] = -SPC * (s + 1);
    end
    for (int s = 0; s < 2 * NSC; s++) begin
      // QPSK: one of four phases, chosen at random
      sc_ph[s] = PI / 4.0 + PI / 2.0 * real'($urandom_range(0, 3));
    end
    for (int t = 0; t < N; t++) begin
      cos_t[t] = $cos(2.0 * PI * t / N);
      sin_t[t] = $sin(2.0 * PI * t / N);
    end
    scale = 1.0;
    pk = 0.0;
    for (int t = 0; t < N; t++) begin
      sig(t, re, im);
      xr[t] = re; xi[t] = im;
      if (re * re + im * im > pk) pk = re * re + im * im;
    end
    scale = 0.95 / $sqrt(pk);
    for (int t = 0; t < N; t++) begin
      xr[t] *= scale; xi[t] *= scale;
    end
  end

  // ---------------- three designs ----------------
  localparam int ND = 3;
  localparam int MS [ND] = '{1, 2, 4};

  logic strobe [ND];
  logic env [ND];
  logic valid [ND];
  logic sat [ND];
  iq_t  din [ND];
  iq_t  dout [ND];

  ti_polar_dsm_top #(.M(1)) u_m1 (.clk(clk), .rst_n(rst_n), .in_iq(din[0]), .in_strobe(strobe[0]),
    .out_iq(dout[0]), .out_env(env[0]), .out_valid(valid[0]), .dsm_sat(sat[0]));
  ti_polar_dsm_top #(.M(2)) u_m2 (.clk(clk), .rst_n(rst_n), .in_iq(din[1]), .in_strobe(strobe[1]),
    .out_iq(dout[1]), .out_env(env[1]), .out_valid(valid[1]), .dsm_sat(sat[1]));
  ti_polar_dsm_top #(.M(4)) u_m4 (.clk(clk), .rst_n(rst_n), .in_iq(din[2]), .in_strobe(strobe[2]),
    .out_iq(dout[2]), .out_env(env[2]), .out_valid(valid[2]), .dsm_sat(sat[2]));

  int  cyc = 0;                  // output-rate time index of the next sampling edge
  int  n_in [ND];
  int  n_out [ND];
  int  first_word_t [ND];        // time index of the input behind the first valid word
  real yr [ND][N], yi [ND][N];
  int  bad_level [ND], n_sat [ND];

  initial for (int d = 0; d < ND; d++) begin
    n_in[d] = 0; n_out[d] = 0; bad_level[d] = 0; n_sat[d] = 0; first_word_t[d] = -1;
    din[d] = '0;
  end

  // inputs: design d samples the ideal signal at time index cyc when strobed
  always @(negedge clk) begin
    if (rst_n) begin
      for (int d = 0; d < ND; d++) begin
        if (strobe[d]) begin
          din[d].i = sample_t'($rtoi(xr[cyc % N] * 16384.0));
          din[d].q = sample_t'($rtoi(xi[cyc % N] * 16384.0));
          if (first_word_t[d] < 0) first_word_t[d] = cyc;
          n_in[d]++;
        end
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      #1;
      for (int d = 0; d < ND; d++) begin
        if (sat[d]) n_sat[d]++;
        if (valid[d]) begin
          real m2;
          m2 = real'(dout[d].i) ** 2 + real'(dout[d].q) ** 2;
          if (env[d] ? (m2 < 16370.0 ** 2 || m2 > 16398.0 ** 2) : (m2 != 0.0)) bad_level[d]++;
          if (n_out[d] >= SKIP && n_out[d] < SKIP + N) begin
            yr[d][n_out[d] - SKIP] = real'(dout[d].i) / 16384.0;
            yi[d][n_out[d] - SKIP] = real'(dout[d].q) / 16384.0;
          end
          n_out[d]++;
        end
      end
    end
  end

  // ---------------- SNDR ----------------
  function automatic real sndr_db(input int d);
    real delay, ps, pe, gr, gi, nr, den;
    real Yr [2 * KBAND + 1], Yi [2 * KBAND + 1], Xr [2 * KBAND + 1], Xi [2 * KBAND + 1];
    int  t0, k, idx;
    // output word 0 of the capture stands for time index first_word_t + SKIP
    t0 = first_word_t[d] + SKIP;
    delay = 1.0 + real'(MS[d] - 1) / 2.0;
    for (int b = -KBAND; b <= KBAND; b++) begin
      real sr, si, a, cr, ci;
      k = (b + N) % N;
      sr = 0.0; si = 0.0;
      for (int n = 0; n < N; n++) begin
        idx = (k * n) % N;
        // Y[k] = sum y[n] e^{-j 2 pi k n / N}
        sr += yr[d][n] * cos_t[idx] + yi[d][n] * sin_t[idx];
        si += yi[d][n] * cos_t[idx] - yr[d][n] * sin_t[idx];
      end
      Yr[b + KBAND] = sr; Yi[b + KBAND] = si;
      // reference: ideal spectrum at bin b, shifted to t0 and delayed
      sr = 0.0; si = 0.0;
      for (int s = 0; s < 2 * NSC; s++) begin
        if (sc_bin[s] == b) begin
          a = 2.0 * PI * real'(b) * (real'(t0) - delay) / real'(N) + sc_ph[s];
          sr = scale * N * $cos(a);
          si = scale * N * $sin(a);
        end
      end
      Xr[b + KBAND] = sr; Xi[b + KBAND] = si;
    end
    // least-squares complex gain g = sum Y X* / sum |X|^2
    nr = 0.0; gi = 0.0; den = 0.0;
    for (int b = 0; b <= 2 * KBAND; b++) begin
      nr  += Yr[b] * Xr[b] + Yi[b] * Xi[b];
      gi  += Yi[b] * Xr[b] - Yr[b] * Xi[b];
      den += Xr[b] ** 2 + Xi[b] ** 2;
    end
    gr = nr / den; gi = gi / den;
    ps = 0.0; pe = 0.0;
    for (int b = 0; b <= 2 * KBAND; b++) begin
      real er, ei, sr, si;
      sr = gr * Xr[b] - gi * Xi[b];
      si = gr * Xi[b] + gi * Xr[b];
      er = Yr[b] - sr; ei = Yi[b] - si;
      ps += sr * sr + si * si;
      pe += er * er + ei * ei;
    end
    $display("  M=%0d  gain %.4f  in-band SNDR %.2f dB", MS[d], $sqrt(gr * gr + gi * gi),
             10.0 * $log10(ps / pe));
    return 10.0 * $log10(ps / pe);
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real s [ND];
    real lo, hi;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (n_out[2] >= SKIP + N && n_out[1] >= SKIP + N && n_out[0] >= SKIP + N);
    lo = 1000.0; hi = -1000.0;
    for (int d = 0; d < ND; d++) begin
      s[d] = sndr_db(d);
      if (s[d] < lo) lo = s[d];
      if (s[d] > hi) hi = s[d];
      checks++;
      if (s[d] < MIN_SNDR_DB) begin
        failures++;
        $display("FAIL M=%0d SNDR %.2f dB below %.1f dB", MS[d], s[d], MIN_SNDR_DB);
      end
      checks++;
      if (bad_level[d] != 0 || n_sat[d] != 0) begin
        failures++;
        $display("FAIL M=%0d: %0d words not two-level, %0d saturated frames", MS[d],
                 bad_level[d], n_sat[d]);
      end
    end
    checks++;
    if (hi - lo > MAX_SPREAD_DB) begin
      failures++;
      $display("FAIL SNDR spread %.2f dB between M = 1, 2, 4", hi - lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
