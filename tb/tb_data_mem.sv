// Test of data_mem: random preload writes are read back at their byte
// addresses (low two bits ignored), later writes overwrite earlier ones, and
// reset clears the array.
module tb_data_mem;
  import riscv_ooo_pkg::*;
  logic clk = 0, rst = 1, we = 0;
  word_t waddr = '0, wdata = '0, raddr = '0, rdata;
  int checks = 0, failures = 0;
  word_t model [256];

  data_mem #(.WORDS(256)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    foreach (model[i]) model[i] = '0;
    for (int i = 0; i < 400; i++) begin
      automatic int a = $urandom_range(255);
      @(negedge clk); we = 1; waddr = word_t'(a * 4 + $urandom_range(3)); wdata = $urandom; model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 256; i++) begin
      raddr = word_t'(i * 4); #1;
      check(rdata == model[i], $sformatf("word %0d: %h vs %h", i, rdata, model[i]));
    end
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    for (int i = 0; i < 256; i += 17) begin
      raddr = word_t'(i * 4); #1; check(rdata == '0, "reset clears");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
