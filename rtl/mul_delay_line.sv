// Multiply delay register ("10 cc register").
//
// A DEPTH-stage shift register for the multiply path: the result bundle
// (valid = multiply_signal, location tag, rd, product) entering at in is
// presented at out exactly DEPTH rising edges later.  It advances every
// cycle and never stalls; reset clears all valid bits.  The 10-cycle depth
// is the reference design's; carrying the product itself through the delay
// (not only the signal and rd) is this design's choice.
module mul_delay_line
  import riscv_ooo_pkg::*;
#(
  parameter int DEPTH = 10
) (
  input  logic    clk,
  input  logic    rst,
  input  result_t in,
  output result_t out
);
  result_t stage [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
    end else begin
      stage[0] <= in;
      for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
    end
  end

  assign out = stage[DEPTH-1];
endmodule
