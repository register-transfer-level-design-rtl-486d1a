// Test of fetch_unit: the instruction "memory" here returns pc ^ a constant,
// so every captured IF/ID word identifies the address it was fetched from.
// Checks: PC holds while run is low, advances by 4 per cycle while running,
// holds (with IF/ID unchanged) during stall, IF/ID empties when run drops.
module tb_fetch_unit;
  import riscv_ooo_pkg::*;
  logic clk = 0, rst = 1, run = 0, stall = 0;
  word_t pc, instr, ifid_instr, ifid_pc;
  logic ifid_valid;
  int checks = 0, failures = 0;

  fetch_unit dut (.*);
  assign instr = pc ^ 32'hA5A5_0000;
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  word_t exp_pc;
  initial begin
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    check(pc == 0 && !ifid_valid, "reset state");
    repeat (3) @(negedge clk);
    check(pc == 0 && !ifid_valid, "holds while run low");
    run = 1; exp_pc = 0;
    for (int i = 0; i < 100; i++) begin
      automatic bit s = ($urandom_range(3) == 0);
      automatic word_t old_instr = ifid_instr;
      automatic bit old_valid = ifid_valid;
      stall = s;
      @(negedge clk);
      if (s) begin
        check(pc == exp_pc, "pc holds during stall");
        check(ifid_instr == old_instr && ifid_valid == old_valid, "IF/ID holds during stall");
      end else begin
        check(ifid_valid && ifid_pc == exp_pc && ifid_instr == (exp_pc ^ 32'hA5A5_0000), "IF/ID captures");
        exp_pc += 4;
        check(pc == exp_pc, $sformatf("pc %h expected %h", pc, exp_pc));
      end
    end
    stall = 0; run = 0;
    @(negedge clk);
    check(!ifid_valid && pc == exp_pc, "run low empties IF/ID and holds pc");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
