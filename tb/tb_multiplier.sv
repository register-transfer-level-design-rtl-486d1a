// Test of the multiplier: low 32 bits of the product for random and corner
// operands, computed here with 64-bit arithmetic.
module tb_multiplier;
  import riscv_ooo_pkg::*;
  word_t a, b, product;
  int checks = 0, failures = 0;

  multiplier dut (.*);

  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic t(input word_t x, input word_t y);
    logic [63:0] p;
    a = x; b = y; #1;
    p = 64'(x) * 64'(y);
    checks++;
    if (product != p[31:0]) begin failures++; $display("FAIL: %h * %h -> %h", x, y, product); end
  endtask

  initial begin
    t(8, 4);
    t(32'hffff_ffff, 32'hffff_ffff);
    t(32'h8000_0000, 2);
    t(0, 32'h1234_5678);
    t(32'h0001_0000, 32'h0001_0000);
    for (int i = 0; i < 2000; i++) t($urandom, $urandom);
    for (int i = 0; i < 500; i++) t($urandom_range(1000), $urandom_range(1000));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
