// ssc_neuron: one segmented spline curve (adaptive activation) neuron.
//
// Computes f(x) = (C[i+1] - C[i]) * ((x + 1) * Delta - i) + C[i] with
// i = floor((x + 1) * Delta), Delta = (L - 1) / 2 = 2**SHIFT, in the order of
// the published SSC layer block diagram:
//   Bit Shift / Bit Split -> integer part and fraction bits,
//   Saturation            -> integer part clamped to 0 .. L-2 (the address),
//   coefficient LUT       -> C[i] and C[i+1],
//   Combination           -> f.
// The fraction bits bypass the saturation and go straight to the
// combination, as in the diagram, so for inputs outside [-1, 1) the neuron
// uses the first or last segment with the raw fraction of (x + 1) * Delta.
//
// Pipeline (register placement is this design's choice): the coefficients and
// fraction are registered after the LUT, and f after the combination, so f
// appears 2 clocks after x; a new x is accepted every clock. The coefficient
// write port (c_we/c_addr/c_data) loads the LUT.
module ssc_neuron
  import sscnn_pkg::*;
#(
  parameter int unsigned SEG_L  = 9,
  parameter int unsigned SHIFT  = $clog2(SEG_L - 1) - 1,  // log2((L-1)/2)
  parameter int unsigned ADDR_W = $clog2(SEG_L)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  fix_t              x,
  input  logic              c_we,
  input  logic [ADDR_W-1:0] c_addr,
  input  fix_t              c_data,
  output fix_t              f
);

  localparam int unsigned INT_W = DATA_W - FRAC_W + 1 + SHIFT;

  logic signed [INT_W-1:0] int_part;
  logic [FRAC_W-1:0]       frac;
  logic [ADDR_W-1:0]       addr;
  logic                    sat_lo, sat_hi;
  fix_t                    c_lo, c_hi;

  bit_shift_split #(.SHIFT(SHIFT), .INT_W(INT_W)) u_shift (
    .x        (x),
    .int_part (int_part),
    .frac     (frac)
  );

  spline_saturation #(.IN_W(INT_W), .SEG_L(SEG_L), .ADDR_W(ADDR_W)) u_sat (
    .int_part (int_part),
    .addr     (addr),
    .sat_lo   (sat_lo),
    .sat_hi   (sat_hi)
  );

  coef_lut #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_lut (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (c_we),
    .waddr (c_addr),
    .wdata (c_data),
    .raddr (addr),
    .c_lo  (c_lo),
    .c_hi  (c_hi)
  );

  // Stage 1 registers: coefficients and fraction.
  fix_t              c_lo_q, c_hi_q;
  logic [FRAC_W-1:0] frac_q;
  fix_t              f_comb;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c_lo_q <= '0;
      c_hi_q <= '0;
      frac_q <= '0;
    end else begin
      c_lo_q <= c_lo;
      c_hi_q <= c_hi;
      frac_q <= frac;
    end
  end

  spline_combination u_comb (
    .c_lo (c_lo_q),
    .c_hi (c_hi_q),
    .frac (frac_q),
    .f    (f_comb)
  );

  // Stage 2 register: activation output.
  always_ff @(posedge clk) begin
    if (!rst_n) f <= '0;
    else        f <= f_comb;
  end

  // The index can never leave the written part of the LUT, and at most one
  // clamp applies.
  always_comb assert (32'(addr) <= SEG_L - 2 && !(sat_lo && sat_hi));

endmodule
