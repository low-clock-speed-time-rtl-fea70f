// dsm_branch: one parallel branch of the time-interleaved envelope
// delta-sigma modulator (DSM). A branch performs one time step of a
// second-order low-pass DSM with a 1-bit quantizer:
//
//   v      = Q(i2)                     quantizer output, level 0 or 1.0
//   i1'    = i1 + env - v              first integrator
//   i2'    = i2 + i1' - v              second integrator
//
// which gives V(z) = z^-1 ENV(z) + (1 - z^-1)^2 E(z). The integrators of the
// branch are not stored inside it: the state (i1, i2) arrives from the
// previous branch and the updated state leaves for the next one, so the
// integrators of the full-rate modulator are formed by the cross-connections
// between branches, and the hardware grows linearly with the branch count.
// That branch chaining follows the design description; the loop filter order
// and coefficients (second order, unit coefficients, levels 0 and 1) and the
// saturating integrators are this design's choices.
//
// Interface: state_in/state_out are Q6.14 integrator pairs, env is the Q2.14
// envelope sample (the same held sample in every branch), q the output bit,
// sat flags that an integrator update hit its limit. Purely combinational.
module dsm_branch
  import polar_dsm_pkg::*;
(
  input  dsm_state_t state_in,
  input  sample_t    env,
  output dsm_state_t state_out,
  output logic       q,
  output logic       sat
);

  sample_t level;
  logic signed [ACC_W+1:0] s1, s2;
  acc_t i1n, i2n;

  one_bit_quantizer u_quant (
    .w    (state_in.i2),
    .q    (q),
    .level(level)
  );

  always_comb begin
    s1 = (ACC_W+2)'(state_in.i1) + (ACC_W+2)'(env) - (ACC_W+2)'(level);
    i1n = acc_sat(s1);
    s2 = (ACC_W+2)'(state_in.i2) + (ACC_W+2)'(i1n) - (ACC_W+2)'(level);
    i2n = acc_sat(s2);
    sat = ((ACC_W+2)'(i1n) != s1) || ((ACC_W+2)'(i2n) != s2);
  end

  assign state_out = '{i1: i1n, i2: i2n};

endmodule
