// sscnn_dpd: segmented spline curve neural network (SSCNN) digital
// predistorter, one complex baseband sample per clock.
//
// Data path, following the SSCNN structure:
//   * I and Q each pass a tapped delay line of memory depth MEM_DEPTH, giving
//     the input vector x = {I(n), I(n-1), I(n-2), Q(n), Q(n-1), Q(n-2)}.
//   * Input layer: a linear fully connected layer of N_HID neurons, no bias,
//     built as systolic multiply-accumulate chains.
//   * SSC layer: N_HID adaptive spline activations sharing SEG_L trainable
//     coefficients; no bias and no nonlinear arithmetic.
//   * Output layer: a linear layer of N_OUT neurons over the N_HID spline
//     outputs plus the envelope terms |I(n)| and |Q(n)|, which bypass the
//     hidden layers (delayed here to stay aligned with their sample).
// For the default sizes this is 6*9 + 9 + 11*2 = 85 coefficients.
//
// Coefficients are loaded through one write port (coef_we/coef_addr/
// coef_data, one word per clock) with this flat map, which is this design's
// choice:
//   0 .. N_X*N_HID-1                  input layer weight [neuron][input]
//   next SEG_L addresses               spline coefficients C[0..L-1]
//   next N_OUT*(N_HID+2) addresses     output layer weight [neuron][input],
//                                      inputs ordered hidden 0..N_HID-1, |I|, |Q|
// Writes take effect on the next clock. They may be made while samples
// stream, but a sample in flight at that moment may be computed with a mix
// of old and new coefficients; drain the pipeline first for a clean switch.
//
// Timing: in_valid qualifies in_i/in_q; the delay lines advance only on valid
// samples. out_valid/out_i/out_q for a sample follow it by
// LATENCY = N_X + 2 + N_HID + 2 clocks (19 for the defaults). Reset is
// synchronous and active low and clears the delay lines, pipelines and all
// coefficients. All words are Q5.26.
module sscnn_dpd
  import sscnn_pkg::*;
#(
  parameter int unsigned MEM_DEPTH   = NET_MEM_DEPTH,
  parameter int unsigned N_HID       = NET_N_HID,
  parameter int unsigned SEG_L       = NET_SEG_L,
  parameter int unsigned N_OUT       = NET_N_OUT,
  parameter int unsigned COEF_ADDR_W = 7
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  fix_t                   in_i,
  input  fix_t                   in_q,
  input  logic                   coef_we,
  input  logic [COEF_ADDR_W-1:0] coef_addr,
  input  fix_t                   coef_data,
  output logic                   out_valid,
  output fix_t                   out_i,
  output fix_t                   out_q
);

  localparam int unsigned N_X      = 2 * (MEM_DEPTH + 1);  // input layer inputs
  localparam int unsigned N_O_IN   = N_HID + 2;             // output layer inputs
  localparam int unsigned SSC_LAT  = 2;
  localparam int unsigned LUT_AW   = $clog2(SEG_L);
  localparam int unsigned BASE_C   = N_X * N_HID;
  localparam int unsigned BASE_OUT = BASE_C + SEG_L;
  localparam int unsigned N_COEF   = BASE_OUT + N_OUT * N_O_IN;
  localparam int unsigned WA_IN_W  = $clog2(N_X * N_HID);
  localparam int unsigned WA_OUT_W = $clog2(N_OUT * N_O_IN);

  // ---------------------------------------------------------------- taps
  fix_t taps_i [MEM_DEPTH+1];
  fix_t taps_q [MEM_DEPTH+1];

  tap_delay_line #(.DATA_W(DATA_W), .DEPTH(MEM_DEPTH)) u_taps_i (
    .clk (clk), .rst_n (rst_n), .en (in_valid), .din (in_i), .taps (taps_i)
  );
  tap_delay_line #(.DATA_W(DATA_W), .DEPTH(MEM_DEPTH)) u_taps_q (
    .clk (clk), .rst_n (rst_n), .en (in_valid), .din (in_q), .taps (taps_q)
  );

  fix_t x_vec [N_X];
  always_comb begin
    for (int k = 0; k <= MEM_DEPTH; k++) begin
      x_vec[k]               = taps_i[k];
      x_vec[MEM_DEPTH+1 + k] = taps_q[k];
    end
  end

  // ------------------------------------------------- coefficient decode
  logic                we_in, we_c, we_out;
  logic [WA_IN_W-1:0]  wa_in;
  logic [LUT_AW-1:0]   wa_c;
  logic [WA_OUT_W-1:0] wa_out;

  always_comb begin
    we_in  = coef_we && (32'(coef_addr) <  BASE_C);
    we_c   = coef_we && (32'(coef_addr) >= BASE_C)   && (32'(coef_addr) < BASE_OUT);
    we_out = coef_we && (32'(coef_addr) >= BASE_OUT) && (32'(coef_addr) < N_COEF);
    wa_in  = WA_IN_W'(coef_addr);
    wa_c   = LUT_AW'(32'(coef_addr) - BASE_C);
    wa_out = WA_OUT_W'(32'(coef_addr) - BASE_OUT);
  end

  // --------------------------------------------------------- input layer
  logic h_valid;
  fix_t h     [N_HID];

  fc_layer #(.N_IN(N_X), .N_NEUR(N_HID), .WA_W(WA_IN_W)) u_input_layer (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .x         (x_vec),
    .w_we      (we_in),
    .w_addr    (wa_in),
    .w_data    (coef_data),
    .out_valid (h_valid),
    .y         (h)
  );

  // ----------------------------------------------------------- SSC layer
  logic a_valid;
  fix_t a     [N_HID];

  ssc_layer #(.N_HID(N_HID), .SEG_L(SEG_L), .ADDR_W(LUT_AW)) u_ssc_layer (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (h_valid),
    .x         (h),
    .c_we      (we_c),
    .c_addr    (wa_c),
    .c_data    (coef_data),
    .out_valid (a_valid),
    .y         (a)
  );

  // ------------------------------------------------------ envelope terms
  fix_t env     [2];
  fix_t env_dly [2];

  envelope_abs u_env_i (.x (in_i), .y (env[0]));
  envelope_abs u_env_q (.x (in_q), .y (env[1]));

  pipe_delay #(.WORDS(2), .DEPTH(N_X + SSC_LAT)) u_env_delay (
    .clk (clk), .rst_n (rst_n), .din (env), .dout (env_dly)
  );

  // -------------------------------------------------------- output layer
  fix_t o_in [N_O_IN];
  fix_t o    [N_OUT];

  always_comb begin
    for (int k = 0; k < N_HID; k++) o_in[k] = a[k];
    o_in[N_HID]   = env_dly[0];
    o_in[N_HID+1] = env_dly[1];
  end

  fc_layer #(.N_IN(N_O_IN), .N_NEUR(N_OUT), .WA_W(WA_OUT_W)) u_output_layer (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (a_valid),
    .x         (o_in),
    .w_we      (we_out),
    .w_addr    (wa_out),
    .w_data    (coef_data),
    .out_valid (out_valid),
    .y         (o)
  );

  assign out_i = o[0];
  assign out_q = o[N_OUT-1];

  initial assert (N_COEF <= 2**COEF_ADDR_W)
    else $error("COEF_ADDR_W too small for %0d coefficients", N_COEF);

endmodule
