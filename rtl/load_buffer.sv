// Load buffer.
//
// ENTRIES entries with locations BASE .. BASE+ENTRIES-1 hold issued lw
// instructions: base register value or tag (V/Q), the 12-bit sign-extended
// offset and rd.  It behaves like a one-operand reservation station:
//  * full / alloc_tag (load_location) name the lowest free entry; alloc
//    writes it at the rising edge, taking a same-cycle write-back result if
//    the base register waits for it.
//  * Wake-up from the write-back bus as in the reservation stations.
//  * Dispatch: the lowest entry whose base is known and that was not sent
//    offers load_addr = base + offset with its rd and location; disp_ready
//    marks it sent.
//  * An entry is freed when its own result is written back.
// Loads are independent of each other here (the core has no stores), so
// they may leave in any order.  The buffer and its load address and
// load_location outputs are the reference design's; the entry count, the
// location range and the address adder inside the buffer are this design's
// choices.
module load_buffer
  import riscv_ooo_pkg::*;
#(
  parameter int ENTRIES = 3,
  parameter int BASE    = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         alloc,
  input  word_t        alloc_base,
  input  tag_t         alloc_q,
  input  word_t        alloc_offset,
  input  regidx_t      alloc_rd,
  output logic         full,
  output tag_t         alloc_tag,
  input  cdb_t         wb,
  input  logic         disp_ready,
  output logic         disp_valid,
  output word_t        load_addr,
  output regidx_t      disp_rd,
  output tag_t         disp_tag,
  output logic [ENTRIES-1:0] busy_vec
);
  typedef struct packed {
    logic    busy;
    logic    sent;
    word_t   base;
    tag_t    q;
    word_t   offset;
    regidx_t rd;
  } lb_entry_t;

  lb_entry_t ent [ENTRIES];
  int unsigned free_idx, disp_idx;

  always_comb begin
    full     = 1'b1;
    free_idx = 0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (!ent[i].busy) begin
        full     = 1'b0;
        free_idx = i;
      end
    end
    alloc_tag = tag_t'(BASE + free_idx);

    disp_valid = 1'b0;
    disp_idx   = 0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (ent[i].busy && !ent[i].sent && ent[i].q == TAG_NONE) begin
        disp_valid = 1'b1;
        disp_idx   = i;
      end
    end
    load_addr = ent[disp_idx].base + ent[disp_idx].offset;
    disp_rd   = ent[disp_idx].rd;
    disp_tag  = tag_t'(BASE + disp_idx);

    for (int i = 0; i < ENTRIES; i++) busy_vec[i] = ent[i].busy;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < ENTRIES; i++) ent[i] <= '0;
    end else begin
      for (int i = 0; i < ENTRIES; i++) begin
        if (ent[i].busy) begin
          if (wb.valid && ent[i].q != TAG_NONE && ent[i].q == wb.tag) begin
            ent[i].base <= wb.data;
            ent[i].q    <= TAG_NONE;
          end
          if (ent[i].sent && wb.valid && wb.tag == tag_t'(BASE + i)) begin
            ent[i].busy <= 1'b0;
            ent[i].sent <= 1'b0;
          end
        end
      end
      if (disp_valid && disp_ready) ent[disp_idx].sent <= 1'b1;
      if (alloc && !full) begin
        ent[free_idx].busy   <= 1'b1;
        ent[free_idx].sent   <= 1'b0;
        ent[free_idx].offset <= alloc_offset;
        ent[free_idx].rd     <= alloc_rd;
        if (wb.valid && alloc_q != TAG_NONE && alloc_q == wb.tag) begin
          ent[free_idx].base <= wb.data;
          ent[free_idx].q    <= TAG_NONE;
        end else begin
          ent[free_idx].base <= alloc_base;
          ent[free_idx].q    <= alloc_q;
        end
      end
    end
  end
endmodule
