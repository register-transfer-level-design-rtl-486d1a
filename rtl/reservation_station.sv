// Reservation station (Tomasulo), used for the multiplier and the adder.
//
// N entries with locations BASE .. BASE+N-1.  Each entry holds Busy, Vj, Vk,
// Qj, Qk, the destination rd and a PAY_W-bit payload (for the adder: funct7,
// funct3, opcode, ALUOp).  Q = 0 means the matching V holds the operand.
//  * Allocation: full is low when an entry is free; alloc_tag is the
//    location of the lowest free entry.  When alloc is high the operands and
//    tags given at issue are written there at the rising edge.  A result on
//    the write-back bus in the same cycle that an operand waits for is taken
//    at once.
//  * Wake-up: every busy entry compares Qj and Qk with the write-back bus tag
//    and copies the data into Vj / Vk when they match.
//  * Dispatch: disp_valid is high when some entry is busy, not yet sent, and
//    has both operands; the lowest such entry is offered.  When disp_ready is
//    also high the entry is marked sent at the edge.  Outputs Vj, Vk, rd,
//    the entry's location and payload.
//  * Release: an entry becomes free when its own result appears on the
//    write-back bus, so a location is never reused while its result is still
//    in flight.
// Entries, fields and location numbers follow the reference design; the
// selection order and release time are this design's choices.
module reservation_station
  import riscv_ooo_pkg::*;
#(
  parameter int N     = 3,
  parameter int BASE  = 6,
  parameter int PAY_W = 1
) (
  input  logic             clk,
  input  logic             rst,
  // allocation (issue)
  input  logic             alloc,
  input  word_t            alloc_vj,
  input  tag_t             alloc_qj,
  input  word_t            alloc_vk,
  input  tag_t             alloc_qk,
  input  regidx_t          alloc_rd,
  input  logic [PAY_W-1:0] alloc_pay,
  output logic             full,
  output tag_t             alloc_tag,
  // write-back bus
  input  cdb_t             wb,
  // dispatch
  input  logic             disp_ready,
  output logic             disp_valid,
  output word_t            disp_vj,
  output word_t            disp_vk,
  output regidx_t          disp_rd,
  output tag_t             disp_tag,
  output logic [PAY_W-1:0] disp_pay,
  // status
  output logic [N-1:0]     busy_vec
);
  typedef struct packed {
    logic             busy;
    logic             sent;
    word_t            vj;
    word_t            vk;
    tag_t             qj;
    tag_t             qk;
    regidx_t          rd;
    logic [PAY_W-1:0] pay;
  } entry_t;

  entry_t ent [N];

  int unsigned free_idx, disp_idx;

  always_comb begin
    full     = 1'b1;
    free_idx = 0;
    for (int i = N - 1; i >= 0; i--) begin
      if (!ent[i].busy) begin
        full     = 1'b0;
        free_idx = i;
      end
    end
    alloc_tag = tag_t'(BASE + free_idx);

    disp_valid = 1'b0;
    disp_idx   = 0;
    for (int i = N - 1; i >= 0; i--) begin
      if (ent[i].busy && !ent[i].sent && ent[i].qj == TAG_NONE && ent[i].qk == TAG_NONE) begin
        disp_valid = 1'b1;
        disp_idx   = i;
      end
    end
    disp_vj  = ent[disp_idx].vj;
    disp_vk  = ent[disp_idx].vk;
    disp_rd  = ent[disp_idx].rd;
    disp_pay = ent[disp_idx].pay;
    disp_tag = tag_t'(BASE + disp_idx);

    for (int i = 0; i < N; i++) busy_vec[i] = ent[i].busy;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) ent[i] <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (ent[i].busy) begin
          if (wb.valid && ent[i].qj != TAG_NONE && ent[i].qj == wb.tag) begin
            ent[i].vj <= wb.data;
            ent[i].qj <= TAG_NONE;
          end
          if (wb.valid && ent[i].qk != TAG_NONE && ent[i].qk == wb.tag) begin
            ent[i].vk <= wb.data;
            ent[i].qk <= TAG_NONE;
          end
          if (ent[i].sent && wb.valid && wb.tag == tag_t'(BASE + i)) begin
            ent[i].busy <= 1'b0;
            ent[i].sent <= 1'b0;
          end
        end
      end
      if (disp_valid && disp_ready) ent[disp_idx].sent <= 1'b1;
      if (alloc && !full) begin
        ent[free_idx].busy <= 1'b1;
        ent[free_idx].sent <= 1'b0;
        ent[free_idx].rd   <= alloc_rd;
        ent[free_idx].pay  <= alloc_pay;
        if (wb.valid && alloc_qj != TAG_NONE && alloc_qj == wb.tag) begin
          ent[free_idx].vj <= wb.data;
          ent[free_idx].qj <= TAG_NONE;
        end else begin
          ent[free_idx].vj <= alloc_vj;
          ent[free_idx].qj <= alloc_qj;
        end
        if (wb.valid && alloc_qk != TAG_NONE && alloc_qk == wb.tag) begin
          ent[free_idx].vk <= wb.data;
          ent[free_idx].qk <= TAG_NONE;
        end else begin
          ent[free_idx].vk <= alloc_vk;
          ent[free_idx].qk <= alloc_qk;
        end
      end
    end
  end
endmodule
