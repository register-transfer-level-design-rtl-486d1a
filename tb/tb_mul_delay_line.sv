// Test of the 10-cycle multiply delay register: a random stream of bundles
// is fed in and each output is compared with the input of exactly DEPTH
// cycles earlier; reset clears all valid bits.
module tb_mul_delay_line;
  import riscv_ooo_pkg::*;
  localparam int DEPTH = 10;
  logic clk = 0, rst = 1;
  result_t in, out;
  int checks = 0, failures = 0;
  result_t hist [$];

  mul_delay_line #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in = '0;
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < DEPTH; i++) hist.push_back('0);
    for (int i = 0; i < 300; i++) begin
      in = '{valid: 1'($urandom), tag: 4'($urandom), rd: 5'($urandom), data: $urandom};
      hist.push_back(in);
      @(negedge clk);
      void'(hist.pop_front());
      checks++;
      if (out != hist[0]) begin failures++; $display("FAIL: cycle %0d out %h expected %h", i, out, hist[0]); end
    end
    rst = 1; @(negedge clk); rst = 0;
    for (int i = 0; i < DEPTH; i++) begin
      in = '0; @(negedge clk);
      checks++; if (out.valid) begin failures++; $display("FAIL: valid after reset"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
