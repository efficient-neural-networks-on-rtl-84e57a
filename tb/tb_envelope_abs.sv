// tb_envelope_abs: checks |x| on edge values and random words.
module tb_envelope_abs;
  import sscnn_pkg::*;
  import sscnn_ref_pkg::*;
  fix_t x, y;
  int checks = 0, failures = 0;
  envelope_abs dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic one(input int v);
    x = v; #1;
    checks++;
    if (y !== abs_ref(v)) begin
      failures++; $display("FAIL |%h| got %h", v, y);
    end
  endtask
  initial begin
    one(0); one(1); one(-1); one(32'h7fffffff); one(32'h80000000); one(32'h80000001);
    one(-(1 << 26)); one(1 << 26);
    for (int k = 0; k < 2000; k++) one($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
