// bit_shift_split: the Bit Shift and Bit Split stages of a spline neuron.
//
// The spline activation needs (x + 1) * Delta, where Delta = (L - 1) / 2 is
// the inverse width of one segment. L is chosen as a power of two plus one,
// so Delta = 2**SHIFT and the multiplication is a left shift. The result
// keeps the binary point of the input: its integer bits are the segment index
// i = floor((x + 1) * Delta) and its FRAC_W fraction bits are
// (x + 1) * Delta - i, the weight of the right-hand coefficient. Both parts are
// produced in parallel from the same word, so no multiply or subtract is
// needed to get them.
//
// Interface: x is Q5.26; int_part is the signed integer part, widened so that
// no input value can overflow it; frac is unsigned with FRAC_W bits.
// Purely combinational.
module bit_shift_split
  import sscnn_pkg::*;
#(
  parameter int unsigned SHIFT = 2,                         // log2(Delta)
  parameter int unsigned INT_W = DATA_W - FRAC_W + 1 + SHIFT
) (
  input  fix_t                    x,
  output logic signed [INT_W-1:0] int_part,
  output logic [FRAC_W-1:0]       frac
);

  localparam int unsigned T_W = DATA_W + 1 + SHIFT;

  logic signed [DATA_W:0] xp1;     // x + 1, one bit wider
  logic signed [T_W-1:0]  scaled;  // (x + 1) * 2**SHIFT

  always_comb begin
    xp1      = (DATA_W+1)'(x) + (DATA_W+1)'(1 <<< FRAC_W);
    scaled   = T_W'(xp1) <<< SHIFT;
    int_part = scaled[T_W-1 -: INT_W];
    frac     = scaled[FRAC_W-1:0];
  end

endmodule
