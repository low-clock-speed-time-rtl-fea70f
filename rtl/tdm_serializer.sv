// tdm_serializer: time-division multiplexer at the output of the branch
// recombiners. Once per frame (ce = 1) it captures the M parallel branch
// words and then sends them out one per fast clock cycle, branch 0 first, so
// the stream leaves at M times the branch rate. This upsamples and
// multiplexes the branch outputs into a single stream, as in the design
// description; the one-cycle output register and the branch order are this
// design's choices.
//
// Interface: par_in[k] is the word of branch k, sampled in the cycle where ce
// is 1; ce must be 1 exactly once every M clock cycles. ser_out is
// registered: par_in[0] is loaded by the rising edge that ends the ce cycle,
// par_in[k] k edges later. With M = 1 the block is a plain register.
module tdm_serializer #(
  parameter int unsigned M = 4,   // number of branches
  parameter int unsigned W = 34   // word width
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ce,
  input  logic [W-1:0] par_in [M],
  output logic [W-1:0] ser_out
);

  localparam int unsigned SW = (M > 1) ? $clog2(M) : 1;

  logic [W-1:0]  shadow [M];
  logic [SW-1:0] sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < M; k++) shadow[k] <= '0;
      sel     <= '0;
      ser_out <= '0;
    end else if (ce) begin
      for (int k = 0; k < M; k++) shadow[k] <= par_in[k];
      ser_out <= par_in[0];
      sel     <= SW'(1 % M);
    end else begin
      ser_out <= shadow[sel];
      sel     <= (32'(sel) == M - 1) ? '0 : sel + 1'b1;
    end
  end

endmodule
