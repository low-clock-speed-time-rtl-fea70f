// cordic_rotation: polar-to-Cartesian recombiner of one branch. Rotates the
// vector (env, 0) by the phase ph with a pipelined CORDIC in rotation mode and
// returns I = env*cos(ph), Q = env*sin(ph).
//
// In the transmitter the envelope is the branch's 1-bit quantized value (0 or
// 1.0), so the output is either zero or a unit vector with the input phase.
// The block is nevertheless a general rotator. Structure: an input register
// with a quadrant pre-rotation (phases in the left half-plane are reduced by
// half a turn and the vector negated), ITER registered add-subtract stages
// that drive the residual angle to zero, and an output register that removes
// the CORDIC gain K with one constant multiplication (1/K in Q0.16), rounds
// and saturates. Using a CORDIC for the polar-to-Cartesian step follows the
// design description; iteration count, guard bits and gain correction at the
// output are this design's choices.
//
// Interface: in_pol.env is Q2.14, in_pol.ph a 16-bit binary angle (65536 = one
// turn); out_iq is Q2.14. Registers advance only when ce is 1. Timing: ITER + 2
// enabled cycles from input to output; in_valid travels alongside as out_valid.
module cordic_rotation
  import polar_dsm_pkg::*;
#(
  parameter int unsigned ITER  = 16,  // CORDIC iterations (add-subtract stages)
  parameter int unsigned GUARD = 3    // extra fraction bits inside the pipeline
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   ce,
  input  logic   in_valid,
  input  polar_t in_pol,
  output logic   out_valid,
  output iq_t    out_iq
);

  localparam int unsigned IW = DATA_W + 2 + GUARD;  // datapath width
  localparam int unsigned AW = 24;                  // internal angle width

  typedef logic signed [IW-1:0] dp_t;
  typedef logic signed [AW-1:0] ang_t;              // signed residual angle

  dp_t  xs [ITER+1];
  dp_t  ys [ITER+1];
  ang_t zs [ITER+1];
  logic vs [ITER+2];

  // input register with quadrant pre-rotation
  dp_t  xin;
  ang_t zin;
  logic left_half;
  assign xin       = dp_t'(in_pol.env) <<< GUARD;
  assign zin       = ang_t'({in_pol.ph, {(AW - PH_W){1'b0}}});
  assign left_half = in_pol.ph[PH_W-1] ^ in_pol.ph[PH_W-2];  // 1/4 .. 3/4 turn

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xs[0] <= '0;
      ys[0] <= '0;
      zs[0] <= '0;
      vs[0] <= 1'b0;
    end else if (ce) begin
      vs[0] <= in_valid;
      ys[0] <= '0;
      if (left_half) begin
        xs[0] <= -xin;
        zs[0] <= zin + (ang_t'(1) <<< (AW - 1));  // minus half a turn (mod one turn)
      end else begin
        xs[0] <= xin;
        zs[0] <= zin;
      end
    end
  end

  for (genvar s = 0; s < ITER; s++) begin : g_stage
    localparam ang_t ATAN = ang_t'((atan_tab(s) + (32'd1 << (31 - AW))) >> (32 - AW));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        xs[s+1] <= '0;
        ys[s+1] <= '0;
        zs[s+1] <= '0;
        vs[s+1] <= 1'b0;
      end else if (ce) begin
        vs[s+1] <= vs[s];
        if (zs[s] >= 0) begin
          xs[s+1] <= xs[s] - (ys[s] >>> s);
          ys[s+1] <= ys[s] + (xs[s] >>> s);
          zs[s+1] <= zs[s] - ATAN;
        end else begin
          xs[s+1] <= xs[s] + (ys[s] >>> s);
          ys[s+1] <= ys[s] - (xs[s] >>> s);
          zs[s+1] <= zs[s] + ATAN;
        end
      end
    end
  end

  // output register: gain correction, rounding, saturation
  localparam int unsigned PW = IW + 17;

  function automatic sample_t scale_sat(input dp_t v);
    logic signed [PW-1:0] p;
    p = PW'(v) * PW'($signed({1'b0, CORDIC_INV_GAIN}));
    p = (p + (PW'(1) <<< (GUARD + 15))) >>> (GUARD + 16);
    if (p > PW'(2**(DATA_W-1) - 1))       return sample_t'(2**(DATA_W-1) - 1);
    else if (p < -PW'(2**(DATA_W-1)))     return sample_t'(-(2**(DATA_W-1)));
    else                                  return sample_t'(p);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_iq     <= '0;
      vs[ITER+1] <= 1'b0;
    end else if (ce) begin
      out_iq.i   <= scale_sat(xs[ITER]);
      out_iq.q   <= scale_sat(ys[ITER]);
      vs[ITER+1] <= vs[ITER];
    end
  end

  assign out_valid = vs[ITER+1];

endmodule
