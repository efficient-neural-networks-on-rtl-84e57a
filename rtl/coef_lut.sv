// coef_lut: the spline coefficient memory of one SSC neuron.
//
// A small LUT-based (distributed) memory of 2**ADDR_W words of DATA_W bits,
// 16 x 32 bits for the 9-coefficient spline. It is read asynchronously at two
// neighbouring addresses at once, giving C[i] and C[i+1] in the same clock as
// the index, which is what the combination stage needs. Words are written
// one per clock through we/waddr/wdata; this is how trained coefficients are
// loaded or replaced at run time. Reset clears the memory (this design's
// choice, so that nothing reads an unwritten word). Only the first L words
// are used by the spline; raddr must stay below 2**ADDR_W - 1.
module coef_lut #(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned DATA_W = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [ADDR_W-1:0]        waddr,
  input  logic signed [DATA_W-1:0] wdata,
  input  logic [ADDR_W-1:0]        raddr,
  output logic signed [DATA_W-1:0] c_lo,
  output logic signed [DATA_W-1:0] c_hi
);

  logic signed [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < 2**ADDR_W; k++) mem[k] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign c_lo = mem[raddr];
  assign c_hi = mem[raddr + ADDR_W'(1)];

endmodule
