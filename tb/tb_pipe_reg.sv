// Test of the stage register with a struct bundle: q follows d one cycle
// later and reset clears it.
module tb_pipe_reg;
  import riscv_ooo_pkg::*;
  logic clk = 0, rst = 1;
  result_t d, q, prev;
  int checks = 0, failures = 0;

  pipe_reg #(.T(result_t)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    d = '1;
    repeat (2) @(posedge clk); @(negedge clk);
    checks++; if (q != '0) failures++;
    rst = 0;
    for (int i = 0; i < 200; i++) begin
      d = '{valid: 1'($urandom), tag: 4'($urandom), rd: 5'($urandom), data: $urandom};
      prev = d;
      @(negedge clk);
      checks++; if (q != prev) begin failures++; $display("FAIL: q %h expected %h", q, prev); end
    end
    rst = 1; @(negedge clk);
    checks++; if (q != '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
