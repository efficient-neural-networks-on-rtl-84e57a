// envelope_abs: envelope term |x| of one signal component.
//
// The SSCNN feeds |I(n)| and |Q(n)| straight into its output layer, next to
// the hidden-layer outputs. This block forms the magnitude of one Q5.26
// word. The single value without a positive counterpart, the most negative
// word, maps to the largest positive word (this saturation is this design's
// choice). Purely combinational.
module envelope_abs
  import sscnn_pkg::*;
(
  input  fix_t x,
  output fix_t y
);

  always_comb begin
    if (x == FIX_MIN)  y = FIX_MAX;
    else if (x < 0)    y = -x;
    else               y = x;
  end

endmodule
