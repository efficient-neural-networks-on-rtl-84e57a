// tb_tap_delay_line: self-checking test of the I/Q tapped delay line.
// Streams random samples with random gaps in the enable and checks every tap
// against a software history of the enabled samples; also checks that reset
// clears the history.
module tb_tap_delay_line;
  localparam int DEPTH = 2;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [31:0] din = '0;
  logic signed [31:0] taps [DEPTH+1];
  int checks = 0, failures = 0;
  logic signed [31:0] hist [DEPTH];

  tap_delay_line #(.DATA_W(32), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic signed [31:0] got, input logic signed [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int k = 0; k < DEPTH; k++) hist[k] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      if (t == 1000) begin
        rst_n = 0; @(posedge clk); #1 rst_n = 1;
        for (int k = 0; k < DEPTH; k++) hist[k] = '0;
      end
      en  = ($urandom_range(0, 3) != 0);
      din = $urandom;
      #1;
      check(taps[0], din, "tap0");
      for (int k = 1; k <= DEPTH; k++) check(taps[k], hist[k-1], $sformatf("tap%0d", k));
      @(posedge clk);
      if (en) begin
        for (int k = DEPTH-1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = din;
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
