// cordic_vectoring: signal component separator. Converts one Cartesian
// baseband sample (I, Q) into its envelope sqrt(I^2 + Q^2) and phase
// atan2(Q, I) with a pipelined CORDIC in vectoring mode.
//
// Structure: an input register, a quadrant pre-rotation (a vector in the left
// half-plane is turned by half a turn so the iterations converge), ITER
// registered add-subtract stages that drive Y to zero while accumulating the
// turned angle, and an output register that removes the CORDIC gain K with
// one constant multiplication (1/K in Q0.16) and rounds to the output words.
// The input and output registers and the add-subtract stages between them
// follow the design description; the iteration count, guard bits and the
// gain correction at the output are this design's choices.
//
// Interface: in_iq is Q2.14 I/Q. out_pol.env is the Q2.14 envelope (saturated
// at the largest positive word), out_pol.ph the phase as a 16-bit binary angle
// (65536 = one turn). All registers advance only in cycles where ce is 1, so
// the block runs at the slow (branch) rate inside a faster clock domain.
// Timing: ITER + 2 enabled cycles from in_iq to out_pol; in_valid travels
// alongside as out_valid. Throughput one sample per enabled cycle.
module cordic_vectoring
  import polar_dsm_pkg::*;
#(
  parameter int unsigned ITER  = 16,  // CORDIC iterations (add-subtract stages)
  parameter int unsigned GUARD = 3    // extra fraction bits inside the pipeline
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   ce,
  input  logic   in_valid,
  input  iq_t    in_iq,
  output logic   out_valid,
  output polar_t out_pol
);

  localparam int unsigned IW = DATA_W + 2 + GUARD;  // datapath width
  localparam int unsigned AW = 24;                  // internal angle width

  typedef logic signed [IW-1:0] dp_t;
  typedef logic        [AW-1:0] ang_t;

  // stage arrays: index 0 is the (pre-rotated) input register
  dp_t  xs [ITER+1];
  dp_t  ys [ITER+1];
  ang_t zs [ITER+1];
  logic vs [ITER+2];

  // input register with quadrant pre-rotation
  dp_t xin, yin;
  assign xin = dp_t'(in_iq.i) <<< GUARD;
  assign yin = dp_t'(in_iq.q) <<< GUARD;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xs[0] <= '0;
      ys[0] <= '0;
      zs[0] <= '0;
      vs[0] <= 1'b0;
    end else if (ce) begin
      vs[0] <= in_valid;
      if (xin < 0) begin
        xs[0] <= -xin;
        ys[0] <= -yin;
        zs[0] <= ang_t'(1) << (AW - 1);  // half a turn
      end else begin
        xs[0] <= xin;
        ys[0] <= yin;
        zs[0] <= '0;
      end
    end
  end

  // ITER add-subtract stages
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
        if (ys[s] >= 0) begin
          xs[s+1] <= xs[s] + (ys[s] >>> s);
          ys[s+1] <= ys[s] - (xs[s] >>> s);
          zs[s+1] <= zs[s] + ATAN;
        end else begin
          xs[s+1] <= xs[s] - (ys[s] >>> s);
          ys[s+1] <= ys[s] + (xs[s] >>> s);
          zs[s+1] <= zs[s] - ATAN;
        end
      end
    end
  end

  // output register: gain correction, rounding, saturation
  localparam int unsigned PW = IW + 17;
  logic signed [PW-1:0] prod;
  logic signed [PW-1:0] env_full;
  sample_t env_sat;
  phase_t  ph_rnd;

  always_comb begin
    prod     = PW'(xs[ITER]) * PW'($signed({1'b0, CORDIC_INV_GAIN}));
    env_full = (prod + (PW'(1) <<< (GUARD + 15))) >>> (GUARD + 16);
    if (env_full > PW'(2**(DATA_W-1) - 1)) env_sat = sample_t'(2**(DATA_W-1) - 1);
    else if (env_full < 0)                 env_sat = '0;
    else                                   env_sat = sample_t'(env_full);
    ph_rnd = phase_t'((zs[ITER] + (ang_t'(1) << (AW - PH_W - 1))) >> (AW - PH_W));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_pol      <= '0;
      vs[ITER+1]   <= 1'b0;
    end else if (ce) begin
      out_pol.env  <= env_sat;
      out_pol.ph   <= ph_rnd;
      vs[ITER+1]   <= vs[ITER];
    end
  end

  assign out_valid = vs[ITER+1];

endmodule
