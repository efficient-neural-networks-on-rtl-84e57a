// spline_combination: the Combination stage of a spline neuron.
//
// Evaluates one linear segment of the spline,
//   f = (C[i+1] - C[i]) * frac + C[i],
// where frac in [0, 1) is the fraction part of (x + 1) * Delta. The
// difference is formed at DATA_W+1 bits, multiplied by the FRAC_W-bit
// fraction and shifted back by FRAC_W bits (rounding towards minus infinity,
// this design's choice). Because frac < 1, f always lies between C[i] and
// C[i+1], so the result fits the DATA_W-bit word without saturation.
// Purely combinational.
module spline_combination
  import sscnn_pkg::*;
(
  input  fix_t              c_lo,
  input  fix_t              c_hi,
  input  logic [FRAC_W-1:0] frac,
  output fix_t              f
);

  localparam int unsigned D_W = DATA_W + 1;
  localparam int unsigned P_W = D_W + FRAC_W + 1;

  logic signed [D_W-1:0] diff;
  logic signed [P_W-1:0] prod;
  logic signed [P_W-1:0] sum;

  always_comb begin
    diff = D_W'(c_hi) - D_W'(c_lo);
    prod = P_W'(diff) * P_W'(signed'({1'b0, frac}));
    sum  = (prod >>> FRAC_W) + P_W'(c_lo);
    f    = fix_t'(sum);
  end

  // The result is between C[i] and C[i+1], so the bits dropped by the
  // narrowing above are only sign copies.
  always_comb assert (sum[P_W-1:DATA_W-1] == '0 || sum[P_W-1:DATA_W-1] == '1);

endmodule
