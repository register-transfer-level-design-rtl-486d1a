// Test of control: every opcode with every funct3 and a set of funct7
// values; the expected unit follows the RV32 encodings of lw, mul and the
// R-type ALU instructions, all else is a no-operation.
module tb_control;
  import riscv_ooo_pkg::*;
  logic [6:0] opcode, funct7;
  logic [2:0] funct3;
  unit_e unit; aluop_e aluop;
  logic reg_write, lw_signal, adder_signal, multiply_signal;
  int checks = 0, failures = 0;

  control dut (.*);

  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [6:0] f7s [5] = '{7'h00, 7'h20, 7'h01, 7'h7f, 7'h10};
  initial begin
    for (int op = 0; op < 128; op++)
      for (int f3 = 0; f3 < 8; f3++)
        foreach (f7s[k]) begin
          unit_e eu; aluop_e ea;
          opcode = 7'(op); funct3 = 3'(f3); funct7 = f7s[k];
          #1;
          eu = UNIT_NONE; ea = ALUOP_ADD;
          if (op == 7'h03 && f3 == 2) eu = UNIT_LOAD;
          if (op == 7'h33) begin
            if (f7s[k] == 7'h01 && f3 == 0) eu = UNIT_MUL;
            if (f7s[k] == 7'h00) begin eu = UNIT_ADD; ea = ALUOP_FUNCT; end
            if (f7s[k] == 7'h20 && (f3 == 0 || f3 == 5)) begin eu = UNIT_ADD; ea = ALUOP_FUNCT; end
          end
          checks++;
          if (unit != eu || (eu != UNIT_NONE && aluop != ea) || reg_write != (eu != UNIT_NONE) ||
              lw_signal != (eu == UNIT_LOAD) || adder_signal != (eu == UNIT_ADD) ||
              multiply_signal != (eu == UNIT_MUL)) begin
            failures++;
            $display("FAIL: op %h f3 %0d f7 %h -> unit %0d aluop %0d", op, f3, f7s[k], unit, aluop);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
