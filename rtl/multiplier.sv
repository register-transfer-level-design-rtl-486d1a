// Multiplier of the EX stage.
//
// Computes the low 32 bits of a * b, which is the RV32M mul result (the
// same for signed and unsigned operands).  Combinational; the product is
// handed to the 10-cycle delay register that models the multiplier's long
// latency.  The unit and its 32-bit multiplier_result are from the
// reference design; building it as one combinational product followed by a
// delay line is this design's choice.
module multiplier
  import riscv_ooo_pkg::*;
(
  input  word_t a,
  input  word_t b,
  output word_t product
);
  logic [2*XLEN-1:0] full;
  assign full    = a * b;
  assign product = full[XLEN-1:0];
endmodule
