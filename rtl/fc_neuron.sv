// fc_neuron: one neuron of a fully connected layer as a systolic chain.
//
// The chain has one multiply-accumulate stage per input, the structure of a
// cascade of DSP48 slices: stage p multiplies input x_p by weight w_p and adds
// the product to the partial sum registered by stage p-1, so the sum
// S = sum_p w_p * x_p is built up one addend per clock while a new sample can
// enter stage 0 every clock. There is no bias term.
//
// Interface: x_skew[p] must carry input p of a sample p clocks after
// x_skew[0] carried input 0 of the same sample (the layer, fc_layer, does that
// skewing once for all its neurons). s is the sum of that sample N_IN clocks
// after x_skew[0] was presented.
//
// Arithmetic (this design's choice; the published SSCNN fixes only the Q5.26
// word):
// each Q5.26 x Q5.26 product is shifted right by 26 bits (rounding towards
// minus infinity) and kept at ACC_W bits, so partial sums cannot overflow; the
// final sum is saturated to the 32-bit word.
module fc_neuron
  import sscnn_pkg::*;
#(
  parameter int unsigned N_IN  = 6,
  parameter int unsigned ACC_W = 2*DATA_W - FRAC_W + $clog2(N_IN + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  fix_t x_skew [N_IN],
  input  fix_t w      [N_IN],
  output fix_t s
);

  localparam int unsigned PROD_W = 2*DATA_W;

  logic signed [ACC_W-1:0] acc [N_IN];

  function automatic logic signed [ACC_W-1:0] mul_scaled(input fix_t a, input fix_t b);
    logic signed [PROD_W-1:0] p;
    p = PROD_W'(a) * PROD_W'(b);
    return ACC_W'(p >>> FRAC_W);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < N_IN; p++) acc[p] <= '0;
    end else begin
      acc[0] <= mul_scaled(x_skew[0], w[0]);
      for (int p = 1; p < N_IN; p++) acc[p] <= acc[p-1] + mul_scaled(x_skew[p], w[p]);
    end
  end

  assign s = sat_fix(64'(acc[N_IN-1]));

endmodule
