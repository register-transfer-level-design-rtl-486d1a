// Test of alu_control against a table of RV32I R-type operations.
module tb_alu_control;
  import riscv_ooo_pkg::*;
  aluop_e aluop; logic [6:0] funct7; logic [2:0] funct3; alu_op_e alu_control_out;
  int checks = 0, failures = 0;

  alu_control dut (.*);

  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic t(input aluop_e a, input logic [6:0] f7, input logic [2:0] f3, input alu_op_e e);
    aluop = a; funct7 = f7; funct3 = f3; #1;
    checks++;
    if (alu_control_out != e) begin
      failures++; $display("FAIL: aluop %0d f7 %h f3 %0d -> %0d expected %0d", a, f7, f3, alu_control_out, e);
    end
  endtask

  initial begin
    for (int f3 = 0; f3 < 8; f3++) begin
      t(ALUOP_ADD, 7'h20, 3'(f3), ALU_ADD);
      t(ALUOP_SUB, 7'h00, 3'(f3), ALU_SUB);
    end
    t(ALUOP_FUNCT, 7'h00, 3'd0, ALU_ADD);
    t(ALUOP_FUNCT, 7'h20, 3'd0, ALU_SUB);
    t(ALUOP_FUNCT, 7'h00, 3'd1, ALU_SLL);
    t(ALUOP_FUNCT, 7'h00, 3'd2, ALU_SLT);
    t(ALUOP_FUNCT, 7'h00, 3'd3, ALU_SLTU);
    t(ALUOP_FUNCT, 7'h00, 3'd4, ALU_XOR);
    t(ALUOP_FUNCT, 7'h00, 3'd5, ALU_SRL);
    t(ALUOP_FUNCT, 7'h20, 3'd5, ALU_SRA);
    t(ALUOP_FUNCT, 7'h00, 3'd6, ALU_OR);
    t(ALUOP_FUNCT, 7'h00, 3'd7, ALU_AND);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
