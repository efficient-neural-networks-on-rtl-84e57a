// tb_fc_layer: self-checking test of the fully connected systolic layer at
// the input-layer size (6 inputs, 9 neurons). Weights are written through the
// write port; random vectors stream in with random gaps; every output vector
// must appear exactly N_IN clocks after its input with out_valid and match
// the integer reference. The weights are then rewritten and the stream
// repeated, and a burst of large values checks output saturation.
module tb_fc_layer;
  import sscnn_pkg::*;
  import sscnn_ref_pkg::*;
  localparam int N_IN = 6, N_NEUR = 9, WA_W = $clog2(N_IN*N_NEUR);
  logic clk = 0, rst_n = 0, in_valid = 0, w_we = 0, out_valid;
  fix_t x [N_IN];
  logic [WA_W-1:0] w_addr = '0;
  fix_t w_data = '0;
  fix_t y [N_NEUR];
  int checks = 0, failures = 0, n_sat = 0, n_out = 0;
  int wm [N_NEUR][N_IN];
  int cyc = 0;
  typedef struct { int t; int y[N_NEUR]; } exp_t;
  exp_t q[$];

  fc_layer #(.N_IN(N_IN), .N_NEUR(N_NEUR), .WA_W(WA_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor: compare every out_valid against the queue.
  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL unexpected out_valid"); end
      else begin
        e = q.pop_front();
        if (cyc - e.t != N_IN) begin failures++; $display("FAIL latency %0d", cyc - e.t); end
        for (int m = 0; m < N_NEUR; m++) begin
          checks++;
          if (y[m] !== e.y[m]) begin
            failures++;
            if (failures < 10) $display("FAIL y[%0d] got %h exp %h", m, y[m], e.y[m]);
          end
        end
        n_out++;
      end
    end
  end

  task automatic load_weights(input int range_bits);
    for (int m = 0; m < N_NEUR; m++)
      for (int p = 0; p < N_IN; p++) begin
        wm[m][p] = int'($urandom_range(0, (1 << range_bits) - 1)) - (1 << (range_bits - 1));
        @(negedge clk);
        w_we = 1; w_addr = WA_W'(m*N_IN + p); w_data = wm[m][p];
      end
    @(negedge clk); w_we = 0;
  endtask

  task automatic stream(input int n, input bit big);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      for (int p = 0; p < N_IN; p++)
        x[p] = big ? fix_t'($urandom) : fix_t'(int'($urandom_range(0, (1 << 27) - 1)) - (1 << 26));
      if (in_valid) begin
        exp_t e;
        int xv[] = new[N_IN];
        int wv[] = new[N_IN];
        e.t = cyc;
        foreach (xv[p]) xv[p] = x[p];
        for (int m = 0; m < N_NEUR; m++) begin
          foreach (wv[p]) wv[p] = wm[m][p];
          e.y[m] = neuron_ref(xv, wv);
          if (e.y[m] == int'(WMAX) || e.y[m] == int'(WMIN)) n_sat++;
        end
        q.push_back(e);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (N_IN + 2) @(negedge clk);
  endtask

  initial begin
    for (int p = 0; p < N_IN; p++) x[p] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    load_weights(28);
    stream(500, 0);
    load_weights(28);
    stream(500, 0);
    stream(100, 1);
    checks += 3;
    if (q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", q.size()); end
    if (n_sat == 0)    begin failures++; $display("FAIL saturation never exercised"); end
    if (n_out < 800)   begin failures++; $display("FAIL only %0d outputs", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
