// pipe_delay: a fixed delay of DEPTH clocks for a vector of Q5.26 words.
//
// Used to keep side paths (the envelope terms) aligned with the layer
// pipeline they join. Reset clears every stage. dout is din from DEPTH clocks
// earlier; DEPTH must be at least 1.
module pipe_delay
  import sscnn_pkg::*;
#(
  parameter int unsigned WORDS = 2,
  parameter int unsigned DEPTH = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  fix_t din  [WORDS],
  output fix_t dout [WORDS]
);

  fix_t stage [DEPTH][WORDS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int d = 0; d < DEPTH; d++)
        for (int k = 0; k < WORDS; k++) stage[d][k] <= '0;
    end else begin
      stage[0] <= din;
      for (int d = 1; d < DEPTH; d++) stage[d] <= stage[d-1];
    end
  end

  assign dout = stage[DEPTH-1];

endmodule
