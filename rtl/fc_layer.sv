// fc_layer: a fully connected linear layer built from systolic neurons.
//
// y[m] = sum_p W[m][p] * x[p] for m = 0 .. N_NEUR-1, with no bias. The layer
// delays input p by p clocks in a small skew register chain, shared by all
// neurons, and feeds the skewed vector to N_NEUR fc_neuron chains that run in
// parallel. The input and output layers of the predistorter are both made of
// this block (6 inputs x 9 neurons, and 11 inputs x 2 neurons).
//
// Weights sit in a register file written one word at a time through
// w_we/w_addr/w_data, address = m*N_IN + p; a write takes effect on the next
// clock and reset clears all weights (this loading scheme is this design's
// choice). Timing: one input vector per clock; y for the vector presented
// with in_valid appears N_IN clocks later with out_valid.
module fc_layer
  import sscnn_pkg::*;
#(
  parameter int unsigned N_IN   = 6,
  parameter int unsigned N_NEUR = 9,
  parameter int unsigned WA_W   = $clog2(N_IN * N_NEUR)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  fix_t            x [N_IN],
  input  logic            w_we,
  input  logic [WA_W-1:0] w_addr,
  input  fix_t            w_data,
  output logic            out_valid,
  output fix_t            y [N_NEUR]
);

  // Weight register file, flat index m*N_IN + p.
  fix_t wmem [N_IN*N_NEUR];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < N_IN*N_NEUR; k++) wmem[k] <= '0;
    end else if (w_we && (32'(w_addr) < N_IN*N_NEUR)) begin
      wmem[w_addr] <= w_data;
    end
  end

  // Skew: input p passes through p registers. skew[p][d] is input p
  // delayed by d+1 clocks.
  fix_t skew   [N_IN][N_IN];
  fix_t x_skew [N_IN];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < N_IN; p++)
        for (int d = 0; d < N_IN; d++) skew[p][d] <= '0;
    end else begin
      for (int p = 0; p < N_IN; p++) begin
        skew[p][0] <= x[p];
        for (int d = 1; d < N_IN; d++) skew[p][d] <= skew[p][d-1];
      end
    end
  end

  always_comb begin
    x_skew[0] = x[0];
    for (int p = 1; p < N_IN; p++) x_skew[p] = skew[p][p-1];
  end

  for (genvar m = 0; m < N_NEUR; m++) begin : g_neuron
    fix_t wrow [N_IN];
    always_comb for (int p = 0; p < N_IN; p++) wrow[p] = wmem[m*N_IN + p];
    fc_neuron #(.N_IN(N_IN)) u_neuron (
      .clk    (clk),
      .rst_n  (rst_n),
      .x_skew (x_skew),
      .w      (wrow),
      .s      (y[m])
    );
  end

  // Valid travels alongside the data.
  logic [N_IN-1:0] vpipe;
  always_ff @(posedge clk) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[N_IN-2:0], in_valid};
  end
  assign out_valid = vpipe[N_IN-1];

endmodule
