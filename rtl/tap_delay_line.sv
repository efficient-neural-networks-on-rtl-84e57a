// tap_delay_line: the Z^-1 ... Z^-m delay chain in front of the input layer.
//
// It presents the current sample and the DEPTH previous ones of one real
// stream (the I or the Q component): taps[0] = x(n) is the input itself,
// taps[k] = x(n-k) comes from the k-th register of a shift chain. The chain
// advances only when `en` is high, so gaps in a sample stream do not disturb
// the memory. Reset clears the history to zero. The memory depth of 2 is the
// one the predistorter uses; the enable and reset are this design's choice.
// Timing: taps[0] is combinational from din; taps[k] changes one clock after
// each enabled sample.
module tap_delay_line #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned DEPTH  = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [DATA_W-1:0] din,
  output logic signed [DATA_W-1:0] taps [DEPTH+1]
);

  logic signed [DATA_W-1:0] hist [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < DEPTH; k++) hist[k] <= '0;
    end else if (en) begin
      hist[0] <= din;
      for (int k = 1; k < DEPTH; k++) hist[k] <= hist[k-1];
    end
  end

  always_comb begin
    taps[0] = din;
    for (int k = 1; k <= DEPTH; k++) taps[k] = hist[k-1];
  end

endmodule
