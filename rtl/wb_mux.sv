// Write-back multiplexer.
//
// In the WB stage at most one of lw_signal, adder_signal and multiply_signal
// is high (the dispatch logic reserves the write-back slot).  The mux picks
// read_data, adder_result_mem or multiplier_result accordingly and drives
// the write-back bus with the producer's location tag and rd.  With no
// signal high the bus is invalid.  Combinational.  The three inputs and the
// selecting signals follow the reference design; the priority order for the
// (never expected) case of several high signals is this design's.
module wb_mux
  import riscv_ooo_pkg::*;
(
  input  logic    lw_signal,
  input  word_t   read_data,
  input  tag_t    load_tag,
  input  regidx_t rd_load,
  input  logic    adder_signal,
  input  word_t   adder_result_mem,
  input  tag_t    adder_tag,
  input  regidx_t rd_adder,
  input  logic    multiply_signal,
  input  word_t   multiplier_result,
  input  tag_t    multiply_tag,
  input  regidx_t rd_multiply,
  output cdb_t    wb
);
  always_comb begin
    wb = '0;
    if (lw_signal) begin
      wb = '{valid: 1'b1, tag: load_tag, rd: rd_load, data: read_data};
    end else if (adder_signal) begin
      wb = '{valid: 1'b1, tag: adder_tag, rd: rd_adder, data: adder_result_mem};
    end else if (multiply_signal) begin
      wb = '{valid: 1'b1, tag: multiply_tag, rd: rd_multiply, data: multiplier_result};
    end
  end
endmodule
