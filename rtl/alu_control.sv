// ALU control.
//
// Turns ALUOp (from the main control, carried through the adder reservation
// station) and funct7/funct3 of an R-type instruction into the 4-bit ALU
// operation alu_control_out.  ALUOp 00 gives add, 01 subtract, 10 decodes
// the RV32I R-type funct fields (add, sub, sll, slt, sltu, xor, srl, sra, or,
// and).  Combinational.  The inputs and the 4-bit output follow the
// reference design; the encoding beyond add/sub/and/or is this design's.
module alu_control
  import riscv_ooo_pkg::*;
(
  input  aluop_e     aluop,
  input  logic [6:0] funct7,
  input  logic [2:0] funct3,
  output alu_op_e    alu_control_out
);
  always_comb begin
    unique case (aluop)
      ALUOP_ADD: alu_control_out = ALU_ADD;
      ALUOP_SUB: alu_control_out = ALU_SUB;
      default: begin
        unique case (funct3)
          3'b000:  alu_control_out = (funct7 == F7_ALT) ? ALU_SUB : ALU_ADD;
          3'b001:  alu_control_out = ALU_SLL;
          3'b010:  alu_control_out = ALU_SLT;
          3'b011:  alu_control_out = ALU_SLTU;
          3'b100:  alu_control_out = ALU_XOR;
          3'b101:  alu_control_out = (funct7 == F7_ALT) ? ALU_SRA : ALU_SRL;
          3'b110:  alu_control_out = ALU_OR;
          default: alu_control_out = ALU_AND;
        endcase
      end
    endcase
  end
endmodule
