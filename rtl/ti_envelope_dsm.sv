// ti_envelope_dsm: M-branch time-interleaved envelope delta-sigma modulator.
//
// The full-rate modulator would run at f_s. Here one envelope sample arrives
// per frame of M full-rate periods (rate f_s/M) and is applied unchanged to
// all M branches, which is the sample-and-hold upsampling of the input: no
// input delay line or downsamplers are needed. Branch k computes full-rate
// time step k of the frame; the branches are chained through their
// integrator states, and the state leaving the last branch is stored in the
// frame register and feeds branch 0 in the next frame. The result is
// bit-identical to the single-rate modulator fed with each input sample
// repeated M times, while every register here is clocked only once per frame.
// Applying the same held sample to all branches, and chaining the branch
// integrators instead of keeping per-branch integrators, follow the design
// description; the register placement is this design's choice.
//
// Interface: env/in_valid are taken in cycles where ce is 1 (one per frame).
// q[k] is the output bit of full-rate step k of the frame (k = 0 first in
// time), registered, so it appears one enabled cycle after env; out_valid
// follows in_valid with the same delay. sat_seen pulses (registered) when an
// integrator saturated during the frame. Critical path: M branches in series,
// which has the whole frame period (M fast clock periods) to settle.
module ti_envelope_dsm
  import polar_dsm_pkg::*;
#(
  parameter int unsigned M = 4  // number of parallel branches
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ce,
  input  logic         in_valid,
  input  sample_t      env,
  output logic         out_valid,
  output logic [M-1:0] q,
  output logic         sat_seen
);

  dsm_state_t frame_state;          // frame register: state entering branch 0
  dsm_state_t last_state;           // state leaving branch M-1
  logic [M-1:0] q_c;
  logic [M-1:0] sat_c;

  for (genvar k = 0; k < M; k++) begin : g_branch
    dsm_state_t st_in, st_out;
    if (k == 0) begin : g_first
      assign st_in = frame_state;
    end else begin : g_next
      assign st_in = g_branch[k-1].st_out;
    end
    dsm_branch u_branch (
      .state_in (st_in),
      .env      (env),
      .state_out(st_out),
      .q        (q_c[k]),
      .sat      (sat_c[k])
    );
  end

  assign last_state = g_branch[M-1].st_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_state <= '0;
      q           <= '0;
      out_valid   <= 1'b0;
      sat_seen    <= 1'b0;
    end else if (ce) begin
      out_valid <= in_valid;
      if (in_valid) begin
        frame_state <= last_state;
        q           <= q_c;
        sat_seen    <= |sat_c;
      end else begin
        sat_seen    <= 1'b0;
      end
    end
  end

endmodule
