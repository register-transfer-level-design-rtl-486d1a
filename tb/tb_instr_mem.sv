// Test of instr_mem: words written through the load port read back at their
// byte address, unwritten words read zero, reads past the end read zero, and
// reset clears the array.
module tb_instr_mem;
  import riscv_ooo_pkg::*;
  logic clk = 0, rst = 1, we = 0;
  word_t waddr = '0, wdata = '0, raddr = '0, rdata;
  int checks = 0, failures = 0;
  word_t model [64];

  instr_mem #(.WORDS(64)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    foreach (model[i]) model[i] = '0;
    for (int i = 0; i < 40; i++) begin
      automatic int a = $urandom_range(63);
      @(negedge clk); we = 1; waddr = word_t'(a * 4); wdata = $urandom; model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 64; i++) begin
      raddr = word_t'(i * 4 + (i % 4)); #1;
      check(rdata == model[i], $sformatf("word %0d: %h vs %h", i, rdata, model[i]));
    end
    raddr = 32'd256; #1 check(rdata == '0, "read past the end is zero");
    raddr = 32'h1000; #1 check(rdata == '0, "far read past the end is zero");
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    raddr = '0;
    for (int i = 0; i < 64; i++) begin
      raddr = word_t'(i * 4); #1; check(rdata == '0, "reset clears");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
