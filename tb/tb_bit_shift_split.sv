// tb_bit_shift_split: checks the integer part and the fraction of
// (x + 1) * 4 against the integer reference, on segment boundaries, the
// ends of the [-1, 1) range, the extreme words and random inputs.
module tb_bit_shift_split;
  import sscnn_pkg::*;
  import sscnn_ref_pkg::*;
  localparam int SHIFT = 2;
  localparam int INT_W = 32 - 26 + 1 + SHIFT;
  fix_t x;
  logic signed [INT_W-1:0] int_part;
  logic [25:0] frac;
  int checks = 0, failures = 0;
  bit_shift_split #(.SHIFT(SHIFT), .INT_W(INT_W)) dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic one(input int v);
    longint t, i, f;
    x = v; #1;
    t = (longint'(v) + (64'sd1 <<< 26)) * 4;
    i = spline_index(v, SHIFT);
    f = t - (i <<< 26);
    checks += 2;
    if (longint'(int_part) != i) begin failures++; $display("FAIL int(%h): got %0d exp %0d", v, int_part, i); end
    if (longint'(frac) != f)     begin failures++; $display("FAIL frac(%h): got %h exp %h", v, frac, f); end
  endtask
  initial begin
    for (int k = -8; k <= 8; k++) begin
      one(k * (1 << 24)); one(k * (1 << 24) - 1); one(k * (1 << 24) + 1);
    end
    one(32'h7fffffff); one(32'h80000000);
    for (int k = 0; k < 3000; k++) one($urandom);
    for (int k = 0; k < 3000; k++) one(int'($urandom_range(0, 1 << 28)) - (1 << 27));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
