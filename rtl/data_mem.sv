// Data memory.
//
// WORDS 32-bit words, read asynchronously in the MEM stage at byte address
// raddr (bits [1:0] ignored, addresses wrap modulo the size).  The core only
// executes lw, so the write port (we/waddr/wdata) serves to preload data
// before a program runs; a write takes effect at the rising edge.  Reset
// clears the array.  The block and its read_data output come from the
// reference design; its size and the preload port are this design's choice.
module data_mem
  import riscv_ooo_pkg::*;
#(
  parameter int WORDS = 256
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  we,
  input  word_t waddr,
  input  word_t wdata,
  input  word_t raddr,
  output word_t rdata
);
  localparam int AW = $clog2(WORDS);

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < WORDS; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr[AW+1:2]] <= wdata;
    end
  end

  assign rdata = mem[raddr[AW+1:2]];
endmodule
