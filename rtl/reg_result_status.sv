// Register result status: the register file with Tomasulo renaming.
//
// Each of the 32 registers has three fields: pointer/result (the value, or
// while busy the location of its producer), result_status (busy flag) and
// store_rd_id (the producer's location tag).  Behaviour:
//  * Read ports rs1/rs2 (combinational) return the value and a tag q.  q is 0
//    when the value is usable; otherwise it is the producer's location.  A
//    result on the write-back bus in the same cycle is forwarded, so an
//    operand completing now reads as ready.
//  * Rename port: at the rising edge, register ren_rd becomes busy with tag
//    ren_tag and its pointer/result field shows the tag.
//  * Write-back: at the rising edge, register wb.rd takes wb.data and turns
//    free, but only if it is still waiting for that very tag (a later rename
//    of the same register wins).  A rename and a write-back of the same
//    register in one cycle leave the register renamed.
//  * x0 always reads 0 and is never renamed or written.
//  * A preload port (init_*) writes a value and clears busy, for setting up
//    register contents before a program runs.  Reset clears everything.
// The three fields and the pointer-or-result behaviour are the reference
// design's; forwarding from the write-back bus and the tag check on write
// are this design's choices.
module reg_result_status
  import riscv_ooo_pkg::*;
#(
  parameter int NREGS_P = 32
) (
  input  logic    clk,
  input  logic    rst,
  // read ports
  input  regidx_t rs1,
  input  regidx_t rs2,
  output word_t   data_1,
  output tag_t    q_1,
  output word_t   data_2,
  output tag_t    q_2,
  // rename (issue)
  input  logic    ren_valid,
  input  regidx_t ren_rd,
  input  tag_t    ren_tag,
  // write-back bus
  input  cdb_t    wb,
  // preload
  input  logic    init_we,
  input  regidx_t init_addr,
  input  word_t   init_data,
  // observation
  input  regidx_t dbg_addr,
  output word_t   dbg_data,
  output logic    dbg_busy
);
  word_t value       [NREGS_P];
  logic  result_busy [NREGS_P];
  tag_t  store_rd_id [NREGS_P];

  function automatic void read_port(input regidx_t r, input word_t v, input logic b,
                                    input tag_t t, input cdb_t w,
                                    output word_t d, output tag_t q);
    if (r == '0) begin
      d = '0;  q = TAG_NONE;
    end else if (!b) begin
      d = v;   q = TAG_NONE;
    end else if (w.valid && w.tag == t) begin
      d = w.data; q = TAG_NONE;
    end else begin
      d = '0;  q = t;
    end
  endfunction

  always_comb begin
    read_port(rs1, value[rs1], result_busy[rs1], store_rd_id[rs1], wb, data_1, q_1);
    read_port(rs2, value[rs2], result_busy[rs2], store_rd_id[rs2], wb, data_2, q_2);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS_P; i++) begin
        value[i]       <= '0;
        result_busy[i] <= 1'b0;
        store_rd_id[i] <= TAG_NONE;
      end
    end else begin
      if (wb.valid && wb.rd != '0 && result_busy[wb.rd] && store_rd_id[wb.rd] == wb.tag) begin
        value[wb.rd]       <= wb.data;
        result_busy[wb.rd] <= 1'b0;
        store_rd_id[wb.rd] <= TAG_NONE;
      end
      if (ren_valid && ren_rd != '0) begin
        value[ren_rd]       <= word_t'(ren_tag);
        result_busy[ren_rd] <= 1'b1;
        store_rd_id[ren_rd] <= ren_tag;
      end
      if (init_we && init_addr != '0) begin
        value[init_addr]       <= init_data;
        result_busy[init_addr] <= 1'b0;
        store_rd_id[init_addr] <= TAG_NONE;
      end
    end
  end

  assign dbg_data = (dbg_addr == '0) ? '0 : value[dbg_addr];
  assign dbg_busy = (dbg_addr == '0) ? 1'b0 : result_busy[dbg_addr];
endmodule
