// tb_spline_combination: checks (C[i+1]-C[i])*frac + C[i] against the
// integer reference for the segment ends, extreme coefficient pairs and
// random values.
module tb_spline_combination;
  import sscnn_pkg::*;
  fix_t c_lo, c_hi, f;
  logic [25:0] frac;
  int checks = 0, failures = 0;
  spline_combination dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic one(input int lo, input int hi, input int fr);
    longint e;
    c_lo = lo; c_hi = hi; frac = 26'(fr); #1;
    e = longint'(lo) + (((longint'(hi) - longint'(lo)) * longint'(frac)) >>> 26);
    checks++;
    if (longint'(f) != e) begin failures++; $display("FAIL lo=%h hi=%h fr=%h got %h exp %h", lo, hi, fr, f, e); end
  endtask
  initial begin
    one(100, 200, 0); one(100, 200, (1 << 26) - 1); one(200, 100, 1 << 25);
    one(32'h7fffffff, 32'h80000000, (1 << 26) - 1); one(32'h80000000, 32'h7fffffff, (1 << 26) - 1);
    one(32'h80000000, 32'h7fffffff, 1 << 25);
    for (int k = 0; k < 5000; k++) one($urandom, $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
