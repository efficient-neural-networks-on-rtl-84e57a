// tb_ssc_neuron: self-checking test of one segmented spline neuron (L = 9).
// Loads 9 random coefficients through the write port, then feeds one input
// per clock, covering [-1, 1) densely plus inputs beyond both ends, and
// checks every output 2 clocks later against the integer reference. All three
// saturation cases must occur. The coefficients are then reloaded and the
// sweep repeated, followed by a direct check that the curve passes through
// C[k] at every knot x = -1 + k/4 and through the mean at each midpoint.
module tb_ssc_neuron;
  import sscnn_pkg::*;
  import sscnn_ref_pkg::*;
  localparam int SEG_L = 9, SHIFT = 2, ADDR_W = 4, LAT = 2, N = 3000;
  logic clk = 0, rst_n = 0, c_we = 0;
  fix_t x = '0, c_data = '0, f;
  logic [ADDR_W-1:0] c_addr = '0;
  int checks = 0, failures = 0, n_lo = 0, n_hi = 0, n_mid = 0;
  int c [] = new[SEG_L];
  int xs [N];

  ssc_neuron #(.SEG_L(SEG_L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load();
    for (int k = 0; k < SEG_L; k++) begin
      c[k] = int'($urandom_range(0, (1 << 29) - 1)) - (1 << 28);
      @(negedge clk); c_we = 1; c_addr = ADDR_W'(k); c_data = c[k];
    end
    @(negedge clk); c_we = 0;
  endtask

  task automatic sweep();
    for (int t = 0; t < N + LAT; t++) begin
      @(negedge clk);
      if (t < N) begin
        longint i;
        x = xs[t];
        i = spline_index(xs[t], SHIFT);
        if (i < 0) n_lo++; else if (i > (longint'(SEG_L) - 2)) n_hi++; else n_mid++;
      end
      if (t >= LAT) begin
        int e;
        e = spline_ref(xs[t-LAT], c, SEG_L, SHIFT);
        checks++;
        if (f !== e) begin
          failures++;
          if (failures < 10) $display("FAIL x=%h got %h exp %h", xs[t-LAT], f, e);
        end
      end
    end
  endtask

  initial begin
    for (int t = 0; t < N; t++) begin
      if (t < 2000)       xs[t] = -(1 << 26) + t * ((1 << 27) / 2000) + int'($urandom_range(0, 255));
      else if (t < 2500)  xs[t] = int'($urandom_range(0, (1 << 28))) - (1 << 27);
      else                xs[t] = $urandom;
    end
    xs[0] = -(1 << 26); xs[1] = (1 << 26); xs[2] = (1 << 26) - 1; xs[3] = 32'h7fffffff; xs[4] = 32'h80000000;
    repeat (2) @(negedge clk);
    rst_n = 1;
    load();
    sweep();
    load();
    sweep();
    // Knots: at x = -1 + k/4 the curve must pass exactly through C[k]
    // (checked directly, without the reference package), and halfway
    // between two knots it must give the floor of their mean.
    for (int k = 0; k < SEG_L - 1; k++) begin
      @(negedge clk); x = -(1 << 26) + k * (1 << 24);
      repeat (LAT) @(negedge clk);
      checks++;
      if (f !== c[k]) begin failures++; $display("FAIL knot %0d: got %h exp %h", k, f, c[k]); end
      x = -(1 << 26) + k * (1 << 24) + (1 << 23);
      repeat (LAT) @(negedge clk);
      checks++;
      if (longint'(f) != (longint'(c[k]) + longint'(c[k+1])) >>> 1) begin
        failures++; $display("FAIL midpoint %0d: got %h", k, f);
      end
    end
    checks++;
    if (n_lo == 0 || n_hi == 0 || n_mid == 0) begin
      failures++; $display("FAIL saturation cases lo=%0d hi=%0d mid=%0d", n_lo, n_hi, n_mid);
    end
    $display("cases: below=%0d above=%0d inside=%0d", n_lo, n_hi, n_mid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
