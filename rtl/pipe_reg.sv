// Pipeline stage register (ID/EX, EX/MEM, MEM/WB).
//
// Captures d into q at every rising edge; reset clears q to all zeros, which
// for every bundle used in the core means "stage empty" (valid = 0).  The
// bundle type is a parameter so that each stage carries its own struct.  The
// stage registers are the reference design's; the core's execution paths
// never stall, so there is no enable.
module pipe_reg #(
  parameter type T = logic [31:0]
) (
  input  logic clk,
  input  logic rst,
  input  T     d,
  output T     q
);
  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= d;
  end
endmodule
