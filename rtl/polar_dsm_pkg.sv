// polar_dsm_pkg: types and constants shared by the time-interleaved polar
// delta-sigma modulator (DSM) transmitter baseband.
//
// Sample format: every I, Q, envelope and output sample is a 16-bit two's
// complement number with 1 sign bit, 1 integer bit and 14 fraction bits
// (Q2.14), so 1.0 = 16384. This word format follows the design's published
// gateway description. Phase is this design's own choice: an unsigned binary
// angle in which the full word range is one turn (2^PH_W = 2*pi), so phase
// wrap-around is plain modular arithmetic.
//
// The CORDIC elementary angles atan(2^-i) are kept as a 32-bit binary-angle
// table, entry i = round(atan(2^-i) / (2*pi) * 2^32); the CORDIC blocks use the
// top bits of it. CORDIC_INV_GAIN is round(2^16 / K) with
// K = prod_i sqrt(1 + 2^-2i), the CORDIC gain for 16 or more iterations.
package polar_dsm_pkg;

  localparam int unsigned DATA_W = 16;  // sample word width
  localparam int unsigned FRAC_W = 14;  // fraction bits of a sample
  localparam int unsigned PH_W   = 16;  // phase word width (binary angle)

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic        [PH_W-1:0]   phase_t;

  // One complex baseband sample (Cartesian).
  typedef struct packed {
    sample_t i;
    sample_t q;
  } iq_t;

  // One polar sample: envelope (non-negative, Q2.14) and phase.
  typedef struct packed {
    sample_t env;
    phase_t  ph;
  } polar_t;

  localparam sample_t ONE = sample_t'(1 << FRAC_W);  // 1.0 in Q2.14

  // Integrator word of the envelope modulator: Q6.14, so the loop filter has
  // four more integer bits than a sample and saturates instead of wrapping.
  localparam int unsigned ACC_W = DATA_W + 4;
  typedef logic signed [ACC_W-1:0] acc_t;

  // State passed from one modulator branch to the next (and, through the
  // frame register, from the last branch back to the first).
  typedef struct packed {
    acc_t i1;  // first integrator
    acc_t i2;  // second integrator (quantizer input)
  } dsm_state_t;

  // Saturating conversion of a wider sum to an integrator word.
  function automatic acc_t acc_sat(input logic signed [ACC_W+1:0] v);
    if (v > (ACC_W+2)'(2**(ACC_W-1) - 1))   return acc_t'(2**(ACC_W-1) - 1);
    else if (v < -(ACC_W+2)'(2**(ACC_W-1))) return acc_t'(-(2**(ACC_W-1)));
    else                                    return acc_t'(v);
  endfunction

  localparam logic [15:0] CORDIC_INV_GAIN = 16'd39797;  // 1/K in Q0.16

  // atan(2^-i) as a 32-bit binary angle (2^32 = one turn).
  function automatic logic [31:0] atan_tab(input int unsigned i);
    case (i)
      0:  return 32'h2000_0000;
      1:  return 32'h12E4_051E;
      2:  return 32'h09FB_385B;
      3:  return 32'h0511_11D4;
      4:  return 32'h028B_0D43;
      5:  return 32'h0145_D7E1;
      6:  return 32'h00A2_F61E;
      7:  return 32'h0051_7C55;
      8:  return 32'h0028_BE53;
      9:  return 32'h0014_5F2F;
      10: return 32'h000A_2F98;
      11: return 32'h0005_17CC;
      12: return 32'h0002_8BE6;
      13: return 32'h0001_45F3;
      14: return 32'h0000_A2FA;
      15: return 32'h0000_517D;
      16: return 32'h0000_28BE;
      17: return 32'h0000_145F;
      18: return 32'h0000_0A30;
      19: return 32'h0000_0518;
      20: return 32'h0000_028C;
      21: return 32'h0000_0146;
      22: return 32'h0000_00A3;
      23: return 32'h0000_0051;
      default: return 32'h0;
    endcase
  endfunction

endpackage
