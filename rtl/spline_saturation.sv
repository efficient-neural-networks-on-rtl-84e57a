// spline_saturation: clamps the segment index so it can address the
// coefficient memory directly.
//
// The integer part of (x + 1) * Delta is a segment index only for inputs in
// [-1, 1). Outside that range it is clamped: values at or above the last
// segment become the last segment, L - 2, and negative values become the
// first segment, 0 (with the coefficients counted from 0; counted from 1 as
// in the original description these are L - 1 and 1). The clamped value is
// the memory address itself, so the coefficient LUT needs no address decoder.
// sat_hi and sat_lo flag which clamp was applied. Purely combinational.
module spline_saturation #(
  parameter int unsigned IN_W   = 9,
  parameter int unsigned SEG_L  = 9,
  parameter int unsigned ADDR_W = 4
) (
  input  logic signed [IN_W-1:0] int_part,
  output logic [ADDR_W-1:0]      addr,
  output logic                   sat_lo,
  output logic                   sat_hi
);

  localparam int LAST = int'(SEG_L) - 2;  // highest segment index

  always_comb begin
    sat_lo = int_part < 0;
    sat_hi = int'(int_part) > LAST;
    if (sat_hi)      addr = ADDR_W'(LAST);
    else if (sat_lo) addr = '0;
    else             addr = ADDR_W'(int_part);
  end

endmodule
