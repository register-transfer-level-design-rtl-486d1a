// Shared types and constants of the out-of-order RV32 core.
//
// Every producer of a register value is named by a 4-bit location: 1..3 are
// the load buffer entries, 4..5 the multiply reservation station entries and
// 6..8 the adder reservation station entries (the 4..8 numbering is the
// design's reference numbering; the load buffer range is this design's
// choice). Location 0 means "no producer, value is ready".  The write-back
// bus (cdb_t) carries one result per cycle together with its location, so
// that waiting entries and the register result status can pick it up.
package riscv_ooo_pkg;

  parameter int XLEN  = 32;
  parameter int NREGS = 32;
  parameter int TAG_W = 4;

  typedef logic [XLEN-1:0]  word_t;
  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [4:0]       regidx_t;

  localparam tag_t TAG_NONE = '0;

  // Locations of the buffers (Table-2 style numbering).
  parameter int LB_ENTRIES  = 3;
  parameter int LB_BASE     = 1;
  parameter int MRS_ENTRIES = 2;
  parameter int MRS_BASE    = 4;
  parameter int ARS_ENTRIES = 3;
  parameter int ARS_BASE    = 6;

  // RV32 opcodes and fields used by the core.
  localparam logic [6:0] OPC_LOAD   = 7'b0000011;
  localparam logic [6:0] OPC_OP     = 7'b0110011;
  localparam logic [6:0] F7_BASE    = 7'b0000000;
  localparam logic [6:0] F7_ALT     = 7'b0100000;
  localparam logic [6:0] F7_MULDIV  = 7'b0000001;
  localparam logic [2:0] F3_LW      = 3'b010;

  // ALUOp as produced by the main control.
  typedef enum logic [1:0] {
    ALUOP_ADD   = 2'b00,   // address arithmetic (lw)
    ALUOP_SUB   = 2'b01,   // compare by subtraction
    ALUOP_FUNCT = 2'b10    // R-type: decode funct7/funct3
  } aluop_e;

  // 4-bit ALU operation (alu_control_out). AND/OR/ADD/SUB follow the usual
  // textbook encoding; the other codes are this design's own.
  typedef enum logic [3:0] {
    ALU_AND  = 4'b0000,
    ALU_OR   = 4'b0001,
    ALU_ADD  = 4'b0010,
    ALU_XOR  = 4'b0011,
    ALU_SLL  = 4'b0100,
    ALU_SRL  = 4'b0101,
    ALU_SUB  = 4'b0110,
    ALU_SLT  = 4'b0111,
    ALU_SRA  = 4'b1000,
    ALU_SLTU = 4'b1001
  } alu_op_e;

  // Execution unit an instruction is issued to.
  typedef enum logic [1:0] {
    UNIT_NONE = 2'd0,
    UNIT_LOAD = 2'd1,
    UNIT_ADD  = 2'd2,
    UNIT_MUL  = 2'd3
  } unit_e;

  // Fields the adder reservation station carries for the ALU control.
  typedef struct packed {
    logic [6:0] funct7;
    logic [2:0] funct3;
    logic [6:0] opcode;
    aluop_e     aluop;
  } alu_fields_t;

  // Write-back (common data) bus.
  typedef struct packed {
    logic    valid;
    tag_t    tag;
    regidx_t rd;
    word_t   data;
  } cdb_t;

  // Result travelling down one of the execution paths.
  typedef struct packed {
    logic    valid;
    tag_t    tag;
    regidx_t rd;
    word_t   data;
  } result_t;

endpackage
