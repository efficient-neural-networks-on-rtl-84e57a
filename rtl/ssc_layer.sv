// ssc_layer: the segmented spline curve (SSC) layer, the only hidden layer of
// the SSCNN.
//
// N_HID spline neurons (ssc_neuron) in parallel, one per output of the input
// layer, with no bias. All neurons use the same L trainable coefficients
// C[0..L-1]; each neuron holds its own copy in its LUT so that all of them
// can read two coefficients every clock. A coefficient write
// (c_we/c_addr/c_data) goes to every copy at once, so the copies never differ.
// Sharing one coefficient set across the layer is inferred from the
// network's coefficient count of 85 (54 + 9 + 22); the per-neuron copies are
// this design's choice.
// Timing: one vector per clock, y appears 2 clocks after x, with out_valid
// following in_valid.
module ssc_layer
  import sscnn_pkg::*;
#(
  parameter int unsigned N_HID  = 9,
  parameter int unsigned SEG_L  = 9,
  parameter int unsigned ADDR_W = $clog2(SEG_L)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  fix_t              x [N_HID],
  input  logic              c_we,
  input  logic [ADDR_W-1:0] c_addr,
  input  fix_t              c_data,
  output logic              out_valid,
  output fix_t              y [N_HID]
);

  localparam int unsigned LATENCY = 2;

  for (genvar n = 0; n < N_HID; n++) begin : g_neuron
    ssc_neuron #(.SEG_L(SEG_L), .ADDR_W(ADDR_W)) u_neuron (
      .clk    (clk),
      .rst_n  (rst_n),
      .x      (x[n]),
      .c_we   (c_we && (32'(c_addr) < SEG_L)),
      .c_addr (c_addr),
      .c_data (c_data),
      .f      (y[n])
    );
  end

  logic [LATENCY-1:0] vpipe;
  always_ff @(posedge clk) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LATENCY-2:0], in_valid};
  end
  assign out_valid = vpipe[LATENCY-1];

endmodule
