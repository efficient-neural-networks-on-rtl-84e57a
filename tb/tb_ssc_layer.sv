// tb_ssc_layer: self-checking test of the 9-neuron SSC layer. One shared
// coefficient set is written; random vectors (inside and outside [-1, 1))
// stream in with gaps; every output vector must come 2 clocks after its input
// with out_valid and match the reference spline for each neuron. Writes to
// addresses past L must be ignored. The coefficients are reloaded midway.
module tb_ssc_layer;
  import sscnn_pkg::*;
  import sscnn_ref_pkg::*;
  localparam int N_HID = 9, SEG_L = 9, SHIFT = 2, ADDR_W = 4, LAT = 2;
  logic clk = 0, rst_n = 0, in_valid = 0, c_we = 0, out_valid;
  fix_t x [N_HID];
  fix_t c_data = '0;
  logic [ADDR_W-1:0] c_addr = '0;
  fix_t y [N_HID];
  int checks = 0, failures = 0, n_out = 0, cyc = 0;
  int c [] = new[SEG_L];
  typedef struct { int t; int y[N_HID]; } exp_t;
  exp_t q[$];

  ssc_layer #(.N_HID(N_HID), .SEG_L(SEG_L)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin failures++; $display("FAIL unexpected out_valid"); end
    else begin
      e = q.pop_front();
      if (cyc - e.t != LAT) begin failures++; $display("FAIL latency %0d", cyc - e.t); end
      for (int n = 0; n < N_HID; n++) begin
        checks++;
        if (y[n] !== e.y[n]) begin
          failures++;
          if (failures < 10) $display("FAIL y[%0d] got %h exp %h", n, y[n], e.y[n]);
        end
      end
      n_out++;
    end
  end

  task automatic load();
    for (int k = 0; k < SEG_L; k++) begin
      c[k] = int'($urandom_range(0, (1 << 29) - 1)) - (1 << 28);
      @(negedge clk); c_we = 1; c_addr = ADDR_W'(k); c_data = c[k];
    end
    // Out-of-range addresses must not disturb the coefficients in use.
    for (int k = SEG_L; k < 2**ADDR_W; k++) begin
      @(negedge clk); c_we = 1; c_addr = ADDR_W'(k); c_data = $urandom;
    end
    @(negedge clk); c_we = 0;
  endtask

  task automatic stream(input int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      for (int j = 0; j < N_HID; j++)
        x[j] = fix_t'(int'($urandom_range(0, 3 << 26)) - (3 << 25));
      if (in_valid) begin
        exp_t e;
        e.t = cyc;
        for (int j = 0; j < N_HID; j++) e.y[j] = spline_ref(x[j], c, SEG_L, SHIFT);
        q.push_back(e);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT + 2) @(negedge clk);
  endtask

  initial begin
    for (int j = 0; j < N_HID; j++) x[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    load();
    stream(1000);
    load();
    stream(1000);
    checks += 2;
    if (q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", q.size()); end
    if (n_out < 1000)  begin failures++; $display("FAIL only %0d outputs", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
