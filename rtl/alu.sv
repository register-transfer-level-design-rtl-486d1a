// Adder unit (integer ALU) of the EX stage.
//
// Computes result = a OP b for the 4-bit operation from the ALU control:
// add, sub, and, or, xor, shifts by b[4:0], signed and unsigned
// set-less-than.  Combinational; its result is captured into EX/MEM.  The
// reference design calls this unit the adder and shows a 32-bit
// adder_result; the operation set is this design's reading of an RV32I ALU.
module alu
  import riscv_ooo_pkg::*;
(
  input  word_t   a,
  input  word_t   b,
  input  alu_op_e op,
  output word_t   result
);
  always_comb begin
    unique case (op)
      ALU_AND:  result = a & b;
      ALU_OR:   result = a | b;
      ALU_ADD:  result = a + b;
      ALU_XOR:  result = a ^ b;
      ALU_SLL:  result = a << b[4:0];
      ALU_SRL:  result = a >> b[4:0];
      ALU_SUB:  result = a - b;
      ALU_SLT:  result = {31'b0, $signed(a) < $signed(b)};
      ALU_SRA:  result = word_t'($signed(a) >>> b[4:0]);
      ALU_SLTU: result = {31'b0, a < b};
      default:  result = '0;
    endcase
  end
endmodule
