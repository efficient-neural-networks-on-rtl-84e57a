// tb_coef_lut: writes random words, then reads every address pair
// (C[i], C[i+1]) and compares with a software copy; rewrites words between
// reads, and checks that reset clears the memory.
module tb_coef_lut;
  localparam int ADDR_W = 4;
  logic clk = 0, rst_n = 0, we = 0;
  logic [ADDR_W-1:0] waddr = '0, raddr = '0;
  logic signed [31:0] wdata = '0, c_lo, c_hi;
  int checks = 0, failures = 0;
  logic signed [31:0] model [2**ADDR_W];
  coef_lut #(.ADDR_W(ADDR_W), .DATA_W(32)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic read_all();
    for (int a = 0; a < 2**ADDR_W - 1; a++) begin
      raddr = ADDR_W'(a); #1;
      checks += 2;
      if (c_lo !== model[a])   begin failures++; $display("FAIL c_lo[%0d] %h exp %h", a, c_lo, model[a]); end
      if (c_hi !== model[a+1]) begin failures++; $display("FAIL c_hi[%0d] %h exp %h", a, c_hi, model[a+1]); end
    end
  endtask
  initial begin
    foreach (model[a]) model[a] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    read_all();
    for (int r = 0; r < 20; r++) begin
      repeat ($urandom_range(1, 2**ADDR_W)) begin
        we = 1; waddr = ADDR_W'($urandom); wdata = $urandom;
        @(posedge clk); #1;
        model[waddr] = wdata;
      end
      we = 0;
      read_all();
    end
    rst_n = 0; @(posedge clk); #1 rst_n = 1;
    foreach (model[a]) model[a] = '0;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
