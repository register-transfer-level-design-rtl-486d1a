// Instruction memory.
//
// WORDS 32-bit words, read asynchronously at the byte address raddr (the
// program counter; bits [1:0] are ignored).  A write port (we/waddr/wdata,
// byte address) loads the program before the core runs; writes take effect
// at the rising clock edge.  Locations never written read as zero, which the
// core's control decodes as "no operation".  The memory's existence and its
// 32-bit instruction output come from the reference design; its size and the
// load port are this design's choice.
module instr_mem
  import riscv_ooo_pkg::*;
#(
  parameter int WORDS = 64
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

  // Addresses past the end read as zero (no operation).
  always_comb begin
    if ((raddr >> 2) < XLEN'(WORDS)) rdata = mem[raddr[AW+1:2]];
    else                             rdata = '0;
  end
endmodule
