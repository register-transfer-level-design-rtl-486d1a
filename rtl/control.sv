// Main control (decode) of the issue stage.
//
// From opcode, funct7 and funct3 of the instruction in IF/ID it decides
// which buffer receives the instruction (unit), whether it writes rd
// (reg_write) and the ALUOp for the adder path.  lw goes to the load buffer
// (lw_signal, ALUOp 00), R-type mul (funct7 0000001, funct3 000) to the
// multiply reservation station (multiply_signal), other R-type instructions
// with funct7 0000000 or 0100000 to the adder reservation station
// (adder_signal, ALUOp 10).  Everything else, including all-zero words, is
// treated as a no-operation (UNIT_NONE).  Purely combinational.  The
// opcode/funct inputs and the ALUOp/lw_signal outputs follow the reference
// design; the instruction subset and the funct3 input are this design's.
module control
  import riscv_ooo_pkg::*;
(
  input  logic [6:0] opcode,
  input  logic [6:0] funct7,
  input  logic [2:0] funct3,
  output unit_e      unit,
  output aluop_e     aluop,
  output logic       reg_write,
  output logic       lw_signal,
  output logic       adder_signal,
  output logic       multiply_signal
);
  always_comb begin
    unit  = UNIT_NONE;
    aluop = ALUOP_ADD;
    if (opcode == OPC_LOAD && funct3 == F3_LW) begin
      unit  = UNIT_LOAD;
      aluop = ALUOP_ADD;
    end else if (opcode == OPC_OP) begin
      if (funct7 == F7_MULDIV && funct3 == 3'b000) begin
        unit = UNIT_MUL;
      end else if (funct7 == F7_BASE ||
                   (funct7 == F7_ALT && (funct3 == 3'b000 || funct3 == 3'b101))) begin
        unit  = UNIT_ADD;
        aluop = ALUOP_FUNCT;
      end
    end
    reg_write       = (unit != UNIT_NONE);
    lw_signal       = (unit == UNIT_LOAD);
    adder_signal    = (unit == UNIT_ADD);
    multiply_signal = (unit == UNIT_MUL);
  end
endmodule
