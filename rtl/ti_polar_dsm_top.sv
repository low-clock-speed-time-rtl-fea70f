// ti_polar_dsm_top: M-branch time-interleaved polar delta-sigma modulator
// (DSM) transmitter baseband.
//
// A polar DSM transmitter quantizes only the envelope of the complex baseband
// signal to two levels (0 and 1) and recombines it with the unquantized
// phase, so the result has a constant (on/off) envelope that can drive a
// switched-mode power amplifier after analog up-conversion. The modulator
// normally runs at the full output rate f_s. In this architecture one input
// sample per frame of M output samples (rate f_s/M) is converted to polar
// form once, held for the whole frame, and processed by M parallel modulator
// branches that produce the M output samples of the frame together; a
// time-division multiplexer then streams them out at f_s. All arithmetic
// therefore runs at f_s/M.
//
// Datapath, all at the frame rate except the output multiplexer:
//   cordic_vectoring   I/Q -> envelope, phase (one separator for all branches)
//   ti_envelope_dsm    M chained branches, M envelope bits per frame
//   phase delay        one frame (two for branch 0), aligns the phase with
//                      the envelope bits
//   cordic_rotation xM each branch's bit (as level 0 or 1.0) rotated by the
//                      phase -> branch output I/Q
//   tdm_serializer     M branch words -> one word per clock, branch 0 first
//
// Clocking: a single clock clk at the output rate f_s. A frame counter makes
// the clock enable ce, high one cycle in M; every frame-rate register
// advances only when ce is 1, so its logic has M clock periods to settle.
// The separator/branch/multiplexer structure follows the design description;
// the single-clock clock-enable scheme, the per-branch phase delay and the
// latency are this design's choices.
//
// Interface: in_iq (Q2.14 I/Q, |in_iq| <= 1 for a stable modulator) is sampled
// in the cycle where in_strobe is 1, once every M cycles. out_iq (Q2.14) and
// out_env (the envelope bit: out_iq is a unit vector when 1, zero when 0)
// change every cycle; out_valid marks words that come from sampled inputs.
// Latency: the first word of a frame is on out_iq right after the
// (2*ITER + 5) * M-th rising edge following the edge that sampled the input.
// dsm_sat reports (for one frame) that a modulator integrator saturated,
// which means the input envelope was too large.
module ti_polar_dsm_top
  import polar_dsm_pkg::*;
#(
  parameter int unsigned M    = 4,   // parallel branches (= clock reduction factor)
  parameter int unsigned ITER = 16   // CORDIC iterations
) (
  input  logic clk,
  input  logic rst_n,
  input  iq_t  in_iq,
  output logic in_strobe,
  output iq_t  out_iq,
  output logic out_env,
  output logic out_valid,
  output logic dsm_sat
);

  localparam int unsigned CW = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned LR = ITER + 2;             // rotation CORDIC latency
  localparam int unsigned WW = 2 + 2 * DATA_W;       // multiplexed word width

  // ---------------- frame counter / clock enable ----------------
  logic [CW-1:0] cnt;
  logic          ce;
  logic          started;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      started <= 1'b0;
    end else begin
      cnt     <= (32'(cnt) == M - 1) ? '0 : cnt + 1'b1;
      if (ce) started <= 1'b1;
    end
  end

  assign ce        = (cnt == '0);
  assign in_strobe = ce;

  // ---------------- signal component separator ----------------
  logic   pol_valid;
  polar_t pol;

  cordic_vectoring #(.ITER(ITER)) u_sep (
    .clk      (clk),
    .rst_n    (rst_n),
    .ce       (ce),
    .in_valid (started | ce),
    .in_iq    (in_iq),
    .out_valid(pol_valid),
    .out_pol  (pol)
  );

  // ---------------- time-interleaved envelope modulator ----------------
  logic         q_valid;
  logic [M-1:0] q_bits;

  ti_envelope_dsm #(.M(M)) u_dsm (
    .clk      (clk),
    .rst_n    (rst_n),
    .ce       (ce),
    .in_valid (pol_valid),
    .env      (pol.env),
    .out_valid(q_valid),
    .q        (q_bits),
    .sat_seen (dsm_sat)
  );

  // Phase alignment. The modulator delays the envelope by one full-rate
  // sample (STF z^-1), so bit k of frame F carries the envelope of full-rate
  // time F*M + k - 1: for k >= 1 that is input sample F, for k = 0 the last
  // sample of frame F-1. Branches 1..M-1 therefore take the phase delayed by
  // one frame (ph_d, in step with the bits) and branch 0 the phase delayed
  // by two frames (ph_dd).
  phase_t ph_d, ph_dd;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_d  <= '0;
      ph_dd <= '0;
    end else if (ce) begin
      ph_d  <= pol.ph;
      ph_dd <= ph_d;
    end
  end

  // envelope bits delayed through the rotation latency (output flag only)
  logic [M-1:0] q_pipe [LR];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < LR; s++) q_pipe[s] <= '0;
    end else if (ce) begin
      q_pipe[0] <= q_bits;
      for (int s = 1; s < LR; s++) q_pipe[s] <= q_pipe[s-1];
    end
  end

  // ---------------- per-branch recombination ----------------
  logic [WW-1:0] branch_word [M];

  for (genvar k = 0; k < M; k++) begin : g_recomb
    logic   rot_valid;
    iq_t    rot_iq;
    phase_t ph_k;

    assign ph_k = (k == 0) ? ph_dd : ph_d;

    cordic_rotation #(.ITER(ITER)) u_rot (
      .clk      (clk),
      .rst_n    (rst_n),
      .ce       (ce),
      .in_valid (q_valid),
      .in_pol   ('{env: (q_bits[k] ? ONE : sample_t'(0)), ph: ph_k}),
      .out_valid(rot_valid),
      .out_iq   (rot_iq)
    );

    assign branch_word[k] = {rot_valid, q_pipe[LR-1][k], rot_iq};
  end

  // ---------------- output time-division multiplexer ----------------
  logic [WW-1:0] ser_word;

  tdm_serializer #(.M(M), .W(WW)) u_tdm (
    .clk    (clk),
    .rst_n  (rst_n),
    .ce     (ce),
    .par_in (branch_word),
    .ser_out(ser_word)
  );

  assign out_valid = ser_word[WW-1];
  assign out_env   = ser_word[WW-2];
  assign out_iq    = ser_word[WW-3:0];

endmodule
