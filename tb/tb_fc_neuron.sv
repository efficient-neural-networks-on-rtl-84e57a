// tb_fc_neuron: self-checking test of one systolic multiply-accumulate chain.
// Each clock a new random sample enters, input p skewed by p clocks as the
// chain expects. The sum is compared N_IN clocks later with an integer
// model (products shifted right by 26 bits, sum saturated to 32 bits), which
// also checks the latency and the one-sample-per-clock throughput. A phase
// with large inputs drives the output into saturation.
module tb_fc_neuron;
  import sscnn_pkg::*;
  localparam int N_IN = 6;
  localparam int N_SAMP = 400;
  logic clk = 0, rst_n = 0;
  fix_t x_skew [N_IN];
  fix_t w [N_IN];
  fix_t s;
  int checks = 0, failures = 0, n_sat = 0;
  fix_t xs [N_SAMP][N_IN];
  fix_t expv [N_SAMP];

  fc_neuron #(.N_IN(N_IN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fix_t rnd_fix(input int range_bits);
    longint v;
    v = longint'($urandom_range(0, (1 << range_bits) - 1)) - longint'(1 << (range_bits - 1));
    return fix_t'(v);
  endfunction

  initial begin
    for (int p = 0; p < N_IN; p++) begin
      w[p] = rnd_fix(28);        // |w| < 2
      x_skew[p] = '0;
    end
    for (int n = 0; n < N_SAMP; n++) begin
      automatic longint acc = 0;
      for (int p = 0; p < N_IN; p++) begin
        // Last quarter of samples: large values to reach saturation.
        xs[n][p] = (n >= 3*N_SAMP/4) ? fix_t'({2'b01, 30'($urandom)}) ^ {($urandom_range(0,1) == 1), 31'd0}
                                     : rnd_fix(27);
        acc += (longint'(xs[n][p]) * longint'(w[p])) >>> FRAC_W;
      end
      if (acc > longint'(FIX_MAX))      begin expv[n] = FIX_MAX; n_sat++; end
      else if (acc < longint'(FIX_MIN)) begin expv[n] = FIX_MIN; n_sat++; end
      else                               expv[n] = fix_t'(acc);
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < N_SAMP + N_IN + 1; t++) begin
      for (int p = 0; p < N_IN; p++) begin
        automatic int n = t - p;
        x_skew[p] = (n >= 0 && n < N_SAMP) ? xs[n][p] : '0;
      end
      #1;
      if (t >= N_IN && t - N_IN < N_SAMP) begin
        checks++;
        if (s !== expv[t - N_IN]) begin
          failures++;
          if (failures < 10) $display("FAIL sample %0d: got %h expected %h", t - N_IN, s, expv[t - N_IN]);
        end
      end
      @(posedge clk); #1;
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL no saturation exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
