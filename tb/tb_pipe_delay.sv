// tb_pipe_delay: checks that a vector of words reappears exactly DEPTH
// clocks later, for a random stream, and that reset clears the pipeline.
module tb_pipe_delay;
  import sscnn_pkg::*;
  localparam int WORDS = 2, DEPTH = 8, N = 1000;
  logic clk = 0, rst_n = 0;
  fix_t din [WORDS];
  fix_t dout [WORDS];
  fix_t hist [N][WORDS];
  int checks = 0, failures = 0;

  pipe_delay #(.WORDS(WORDS), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < WORDS; k++) din[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < N; t++) begin
      for (int k = 0; k < WORDS; k++) begin din[k] = $urandom; hist[t][k] = din[k]; end
      for (int k = 0; k < WORDS; k++) begin
        checks++;
        if (dout[k] !== ((t >= DEPTH) ? hist[t-DEPTH][k] : fix_t'(0))) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d word %0d got %h", t, k, dout[k]);
        end
      end
      @(negedge clk);
    end
    rst_n = 0; @(negedge clk); rst_n = 1;
    for (int k = 0; k < WORDS; k++) begin
      checks++;
      if (dout[k] !== '0) begin failures++; $display("FAIL not cleared by reset"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
