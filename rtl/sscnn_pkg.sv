// sscnn_pkg: number format and sizes shared by the SSCNN predistorter.
//
// Every signal between layers is a 32-bit two's-complement fixed-point word
// with 1 sign bit, 5 integer bits and 26 fraction bits (Q5.26), the word
// length used for the whole inference datapath. The network sizes below are
// the SSCNN(9) configuration: memory depth 2 on I and Q, 9 hidden neurons,
// a spline of 9 coefficients and 2 outputs. The saturate/absolute helpers
// are this design's own choice for keeping results inside the 32-bit word.
package sscnn_pkg;

  localparam int unsigned DATA_W    = 32;  // word length
  localparam int unsigned FRAC_W    = 26;  // fraction bits
  localparam int unsigned NET_MEM_DEPTH = 2;  // delay taps per I/Q stream
  localparam int unsigned NET_N_HID     = 9;  // neurons in input and SSC layers
  localparam int unsigned NET_SEG_L     = 9;  // spline coefficient array length L
  localparam int unsigned NET_N_OUT     = 2;  // I_out, Q_out

  typedef logic signed [DATA_W-1:0] fix_t;

  localparam fix_t FIX_MAX = {1'b0, {(DATA_W-1){1'b1}}};
  localparam fix_t FIX_MIN = {1'b1, {(DATA_W-1){1'b0}}};

  // Clamp a 64-bit signed value into a fix_t.
  function automatic fix_t sat_fix(input logic signed [63:0] v);
    if (v > 64'(signed'(FIX_MAX))) return FIX_MAX;
    if (v < 64'(signed'(FIX_MIN))) return FIX_MIN;
    return fix_t'(v);
  endfunction

endpackage
