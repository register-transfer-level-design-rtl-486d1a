// Instruction fetch: program counter, +4 adder and the IF/ID register.
//
// While run is high and the issue stage does not stall, the PC advances by
// 4 every cycle and the instruction at the old PC is captured into IF/ID
// (ifid_valid, ifid_instr, ifid_pc).  On stall both PC and IF/ID hold.  While
// run is low, the PC holds and IF/ID is emptied.  The core has no branches,
// so the PC only ever increments.  Reset puts the PC at 0 and empties IF/ID.
// The PC, its +4 adder and IF/ID are those of the classic 5-stage pipeline;
// the run input and the valid bit are this design's own.
module fetch_unit
  import riscv_ooo_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  run,
  input  logic  stall,
  output word_t pc,
  input  word_t instr,        // instruction memory output at pc
  output logic  ifid_valid,
  output word_t ifid_instr,
  output word_t ifid_pc
);
  always_ff @(posedge clk) begin
    if (rst) begin
      pc         <= '0;
      ifid_valid <= 1'b0;
      ifid_instr <= '0;
      ifid_pc    <= '0;
    end else if (!run) begin
      ifid_valid <= 1'b0;
    end else if (!stall) begin
      pc         <= pc + 32'd4;
      ifid_valid <= 1'b1;
      ifid_instr <= instr;
      ifid_pc    <= pc;
    end
  end
endmodule
