// one_bit_quantizer: the 1-bit quantizer of the envelope modulator, built as a
// relational operator followed by a multiplexer, as in the design
// description. The loop-filter value w is compared with the decision
// threshold; the comparison selects the envelope level 1.0 (Q2.14 word 16384)
// or 0. The two levels 0 and 1 make the transmitted envelope two-level. The
// threshold of 0.5, halfway between the two levels, is this design's choice.
//
// Interface: w is an integrator word (Q6.14); q is the decision bit and level
// the corresponding Q2.14 envelope level. Purely combinational.
module one_bit_quantizer
  import polar_dsm_pkg::*;
#(
  parameter int THRESH = 1 << (FRAC_W - 1)  // decision threshold, 0.5 in Q.14
) (
  input  acc_t    w,
  output logic    q,
  output sample_t level
);

  assign q     = (w >= acc_t'(THRESH));
  assign level = q ? ONE : sample_t'(0);

endmodule
