// tb_spline_saturation: sweeps every value of the 9-bit signed integer part
// and checks the clamped address and the two clamp flags (all three cases).
module tb_spline_saturation;
  localparam int IN_W = 9, SEG_L = 9, ADDR_W = 4;
  logic signed [IN_W-1:0] int_part;
  logic [ADDR_W-1:0] addr;
  logic sat_lo, sat_hi;
  int checks = 0, failures = 0;
  int n_lo = 0, n_hi = 0, n_mid = 0;
  spline_saturation #(.IN_W(IN_W), .SEG_L(SEG_L), .ADDR_W(ADDR_W)) dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = -(1 << (IN_W-1)); v < (1 << (IN_W-1)); v++) begin
      int ea; bit elo, ehi;
      int_part = IN_W'(v); #1;
      elo = (v < 0); ehi = (v > SEG_L - 2);
      ea  = ehi ? SEG_L - 2 : (elo ? 0 : v);
      n_lo += elo; n_hi += ehi; n_mid += !(elo || ehi);
      checks += 3;
      if (int'(addr) != ea) begin failures++; $display("FAIL addr(%0d) got %0d exp %0d", v, addr, ea); end
      if (sat_lo != elo)    begin failures++; $display("FAIL sat_lo(%0d)", v); end
      if (sat_hi != ehi)    begin failures++; $display("FAIL sat_hi(%0d)", v); end
    end
    checks++;
    if (n_lo == 0 || n_hi == 0 || n_mid != SEG_L - 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
