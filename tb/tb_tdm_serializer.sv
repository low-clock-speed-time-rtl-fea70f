// tb_tdm_serializer: self-checking test of the output time-division
// multiplexer (M = 4 branches). Each frame, random branch words are presented
// in the clock-enable cycle; the serial output must then show word 0 one
// clock later and word k k clocks after that, repeating every M cycles with
// no gap. The test also checks that the captured words are held even when
// the parallel inputs change in the middle of a frame.
module tb_tdm_serializer;

  localparam int unsigned M = 4;
  localparam int unsigned W = 12;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ce = 0;
  logic [W-1:0] par_in [M];
  logic [W-1:0] ser_out;

  tdm_serializer #(.M(M), .W(W)) dut (
    .clk(clk), .rst_n(rst_n), .ce(ce), .par_in(par_in), .ser_out(ser_out)
  );

  always #5 clk = ~clk;

  logic [W-1:0] expq [$];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < M; k++) par_in[k] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int f = 0; f < 500; f++) begin
      for (int c = 0; c < M; c++) begin
        @(negedge clk);
        ce = (c == 0);
        if (c == 0) begin
          for (int k = 0; k < M; k++) begin
            par_in[k] = W'($urandom);
            expq.push_back(par_in[k]);
          end
        end else begin
          for (int k = 0; k < M; k++) par_in[k] = W'($urandom);  // must be ignored
        end
        @(posedge clk);
        #1;
        // output after this edge: word c of the frame captured at the last ce
        checks++;
        if (ser_out !== expq[c]) begin
          failures++;
          $display("FAIL frame %0d slot %0d: got %h exp %h", f, c, ser_out, expq[c]);
        end
      end
      repeat (M) void'(expq.pop_front());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
