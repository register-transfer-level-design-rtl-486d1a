// 32-bit RISC-V out-of-order processor (Tomasulo scheduling, 5 stages).
//
// Instructions are fetched and issued in program order, one per cycle:
//   IF   fetch_unit + instr_mem: PC, +4, IF/ID register.
//   ID   control decodes; reg_result_status supplies each source as a value
//        or as the location of its producer; the instruction is written into
//        the load buffer (lw, locations 1-3), the multiply reservation station
//        (mul, 4-5) or the adder reservation station (other R-type, 6-8), and
//        rd is renamed to that location.  A full buffer stalls IF and ID.
//   EX   each buffer dispatches its lowest ready entry into ID/EX, so
//        instructions leave out of program order.  The adder path computes in
//        EX; the multiplier computes in EX and then passes the
//        10-cycle delay register; loads carry their address through EX.
//   MEM  data_mem is read for loads; other results pass through EX/MEM.
//   WB   wb_mux drives the single write-back bus (value, location, rd), which
//        updates the register result status, wakes waiting entries and frees
//        the producing entry.
// Only one result may use the write-back bus per cycle.  A reservation
// vector tracks future bus slots: an add or load (3 cycles from dispatch to
// write-back) may dispatch only if its slot is free, a mul (MUL_DELAY+3
// cycles) books its slot when it dispatches, and a load wins over an add
// dispatching in the same cycle.  Register values can therefore complete out
// of program order, as in the reference waveforms.
//
// Follows the reference design: the block structure, buffers, their
// location numbers and entry counts of the reservation stations, the 10-cycle
// multiply register and the three write-back sources.  This design's own
// choices: the load-buffer size, the write-back slot reservation, release of
// an entry at its write-back, no branches or stores, the run/preload ports.
//
// Ports: clk, rst (synchronous, active high); run enables fetching; the
// imem_*, dmem_* and rf_init_* write ports preload instruction memory, data
// memory and registers; dbg_addr/dbg_data/dbg_busy observe one register;
// wb shows the write-back bus; issue_stall and wb_slot_stall pulse when
// issue waits for a full buffer or a ready instruction waits for the bus;
// idle is high when no instruction is in a buffer or an execution stage.
module riscv_ooo_top
  import riscv_ooo_pkg::*;
#(
  parameter int IMEM_WORDS = 64,
  parameter int DMEM_WORDS = 256,
  parameter int MUL_DELAY  = 10
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    run,
  input  logic    imem_we,
  input  word_t   imem_waddr,
  input  word_t   imem_wdata,
  input  logic    dmem_we,
  input  word_t   dmem_waddr,
  input  word_t   dmem_wdata,
  input  logic    rf_init_we,
  input  regidx_t rf_init_addr,
  input  word_t   rf_init_data,
  input  regidx_t dbg_addr,
  output word_t   dbg_data,
  output logic    dbg_busy,
  output cdb_t    wb,
  output logic    issue_stall,
  output logic    wb_slot_stall,
  output logic    idle
);
  localparam int ADD_LAT = 3;
  localparam int MUL_LAT = MUL_DELAY + 3;

  // ---------------------------------------------------------------- bundles
  typedef struct packed {
    logic        valid;
    tag_t        tag;
    regidx_t     rd;
    word_t       a;
    word_t       b;
    alu_fields_t f;
  } add_op_t;

  typedef struct packed {
    logic    valid;
    tag_t    tag;
    regidx_t rd;
    word_t   a;
    word_t   b;
  } mul_op_t;

  typedef struct packed {
    result_t ld;     // data = load address
    add_op_t add;
    mul_op_t mul;
  } idex_t;

  typedef struct packed {
    result_t ld;     // data = load address (EX/MEM), read data (MEM/WB)
    result_t add;
    result_t mul;
  } stage_t;

  // ------------------------------------------------------------------ IF
  word_t pc, instr, ifid_instr, ifid_pc;
  logic  ifid_valid, stall;

  instr_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .rst, .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata),
    .raddr(pc), .rdata(instr)
  );

  fetch_unit u_fetch (
    .clk, .rst, .run, .stall, .pc, .instr,
    .ifid_valid, .ifid_instr, .ifid_pc
  );

  // ------------------------------------------------------------------ ID
  logic [6:0] opcode, funct7;
  logic [2:0] funct3;
  regidx_t    rd, rs1, rs2;
  word_t      imm_i;
  assign opcode = ifid_instr[6:0];
  assign rd     = ifid_instr[11:7];
  assign funct3 = ifid_instr[14:12];
  assign rs1    = ifid_instr[19:15];
  assign rs2    = ifid_instr[24:20];
  assign funct7 = ifid_instr[31:25];
  assign imm_i  = {{20{ifid_instr[31]}}, ifid_instr[31:20]};

  unit_e  unit;
  aluop_e aluop;
  logic   reg_write, lw_signal, adder_signal, multiply_signal;

  control u_control (
    .opcode, .funct7, .funct3, .unit, .aluop, .reg_write,
    .lw_signal, .adder_signal, .multiply_signal
  );

  word_t data_1, data_2;
  tag_t  q_1, q_2;
  logic  lb_full, mrs_full, ars_full;
  tag_t  load_location, multiply_location, adder_location;
  logic  lb_alloc, mrs_alloc, ars_alloc, ren_valid;
  tag_t  ren_tag;

  always_comb begin
    lb_alloc  = ifid_valid && lw_signal       && !lb_full;
    mrs_alloc = ifid_valid && multiply_signal && !mrs_full;
    ars_alloc = ifid_valid && adder_signal    && !ars_full;
    stall     = ifid_valid && ((lw_signal && lb_full) ||
                               (multiply_signal && mrs_full) ||
                               (adder_signal && ars_full));
    ren_valid = (lb_alloc || mrs_alloc || ars_alloc) && reg_write && rd != '0;
    ren_tag   = lb_alloc ? load_location : (mrs_alloc ? multiply_location : adder_location);
  end
  assign issue_stall = stall;

  reg_result_status #(.NREGS_P(NREGS)) u_regstat (
    .clk, .rst, .rs1, .rs2, .data_1, .q_1, .data_2, .q_2,
    .ren_valid, .ren_rd(rd), .ren_tag, .wb,
    .init_we(rf_init_we), .init_addr(rf_init_addr), .init_data(rf_init_data),
    .dbg_addr, .dbg_data, .dbg_busy
  );

  // ------------------------------------------------- buffers and dispatch
  logic [MUL_LAT:0] wb_resv;
  logic lb_dv, mrs_dv, ars_dv, lb_go, mrs_go, ars_go;
  word_t lb_addr, mrs_vj, mrs_vk, ars_vj, ars_vk;
  regidx_t lb_rd, mrs_rd, ars_rd;
  tag_t lb_tag, mrs_tag, ars_tag;
  logic [0:0] mrs_pay;
  alu_fields_t ars_pay;
  logic [LB_ENTRIES-1:0]  lb_busy;
  logic [MRS_ENTRIES-1:0] mrs_busy;
  logic [ARS_ENTRIES-1:0] ars_busy;

  always_comb begin
    lb_go  = lb_dv  && !wb_resv[ADD_LAT];
    ars_go = ars_dv && !wb_resv[ADD_LAT] && !lb_dv;
    mrs_go = mrs_dv && !wb_resv[MUL_LAT];
  end
  assign wb_slot_stall = (lb_dv || ars_dv) && wb_resv[ADD_LAT];

  always_ff @(posedge clk) begin
    if (rst) wb_resv <= '0;
    else     wb_resv <= (wb_resv >> 1)
                      | ((lb_go || ars_go) ? (MUL_LAT+1)'(1) << (ADD_LAT - 1) : '0)
                      | (mrs_go ? (MUL_LAT+1)'(1) << (MUL_LAT - 1) : '0);
  end

  load_buffer #(.ENTRIES(LB_ENTRIES), .BASE(LB_BASE)) u_lb (
    .clk, .rst, .alloc(lb_alloc), .alloc_base(data_1), .alloc_q(q_1),
    .alloc_offset(imm_i), .alloc_rd(rd), .full(lb_full), .alloc_tag(load_location),
    .wb, .disp_ready(lb_go), .disp_valid(lb_dv), .load_addr(lb_addr),
    .disp_rd(lb_rd), .disp_tag(lb_tag), .busy_vec(lb_busy)
  );

  reservation_station #(.N(MRS_ENTRIES), .BASE(MRS_BASE), .PAY_W(1)) u_mrs (
    .clk, .rst, .alloc(mrs_alloc), .alloc_vj(data_1), .alloc_qj(q_1),
    .alloc_vk(data_2), .alloc_qk(q_2), .alloc_rd(rd), .alloc_pay(1'b0),
    .full(mrs_full), .alloc_tag(multiply_location), .wb,
    .disp_ready(mrs_go), .disp_valid(mrs_dv), .disp_vj(mrs_vj), .disp_vk(mrs_vk),
    .disp_rd(mrs_rd), .disp_tag(mrs_tag), .disp_pay(mrs_pay), .busy_vec(mrs_busy)
  );

  reservation_station #(.N(ARS_ENTRIES), .BASE(ARS_BASE), .PAY_W($bits(alu_fields_t))) u_ars (
    .clk, .rst, .alloc(ars_alloc), .alloc_vj(data_1), .alloc_qj(q_1),
    .alloc_vk(data_2), .alloc_qk(q_2), .alloc_rd(rd),
    .alloc_pay({funct7, funct3, opcode, aluop}),
    .full(ars_full), .alloc_tag(adder_location), .wb,
    .disp_ready(ars_go), .disp_valid(ars_dv), .disp_vj(ars_vj), .disp_vk(ars_vk),
    .disp_rd(ars_rd), .disp_tag(ars_tag), .disp_pay(ars_pay), .busy_vec(ars_busy)
  );

  // ------------------------------------------------------------- ID/EX
  idex_t idex_d, idex_q;
  always_comb begin
    idex_d         = '0;
    idex_d.ld      = '{valid: lb_go, tag: lb_tag, rd: lb_rd, data: lb_addr};
    idex_d.add     = '{valid: ars_go, tag: ars_tag, rd: ars_rd, a: ars_vj, b: ars_vk, f: ars_pay};
    idex_d.mul     = '{valid: mrs_go, tag: mrs_tag, rd: mrs_rd, a: mrs_vj, b: mrs_vk};
  end
  pipe_reg #(.T(idex_t)) u_idex (.clk, .rst, .d(idex_d), .q(idex_q));

  // ------------------------------------------------------------------ EX
  alu_op_e alu_control_out;
  word_t   adder_result, product;
  result_t mul_in, mul_out;

  alu_control u_aluctl (
    .aluop(idex_q.add.f.aluop), .funct7(idex_q.add.f.funct7),
    .funct3(idex_q.add.f.funct3), .alu_control_out
  );
  alu u_adder (.a(idex_q.add.a), .b(idex_q.add.b), .op(alu_control_out), .result(adder_result));
  multiplier u_mul (.a(idex_q.mul.a), .b(idex_q.mul.b), .product);

  assign mul_in = '{valid: idex_q.mul.valid, tag: idex_q.mul.tag, rd: idex_q.mul.rd, data: product};
  mul_delay_line #(.DEPTH(MUL_DELAY)) u_mul_delay (.clk, .rst, .in(mul_in), .out(mul_out));

  stage_t exmem_d, exmem_q;
  always_comb begin
    exmem_d.ld  = idex_q.ld;
    exmem_d.add = '{valid: idex_q.add.valid, tag: idex_q.add.tag, rd: idex_q.add.rd, data: adder_result};
    exmem_d.mul = mul_out;
  end
  pipe_reg #(.T(stage_t)) u_exmem (.clk, .rst, .d(exmem_d), .q(exmem_q));

  // ----------------------------------------------------------------- MEM
  word_t read_data;
  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .rst, .we(dmem_we), .waddr(dmem_waddr), .wdata(dmem_wdata),
    .raddr(exmem_q.ld.data), .rdata(read_data)
  );

  stage_t memwb_d, memwb_q;
  always_comb begin
    memwb_d         = exmem_q;
    memwb_d.ld.data = read_data;
  end
  pipe_reg #(.T(stage_t)) u_memwb (.clk, .rst, .d(memwb_d), .q(memwb_q));

  // ------------------------------------------------------------------ WB
  wb_mux u_wbmux (
    .lw_signal(memwb_q.ld.valid), .read_data(memwb_q.ld.data),
    .load_tag(memwb_q.ld.tag), .rd_load(memwb_q.ld.rd),
    .adder_signal(memwb_q.add.valid), .adder_result_mem(memwb_q.add.data),
    .adder_tag(memwb_q.add.tag), .rd_adder(memwb_q.add.rd),
    .multiply_signal(memwb_q.mul.valid), .multiplier_result(memwb_q.mul.data),
    .multiply_tag(memwb_q.mul.tag), .rd_multiply(memwb_q.mul.rd),
    .wb
  );

  // At most one result reaches write-back per cycle.
  a_one_writeback: assert property (@(posedge clk) disable iff (rst)
    $onehot0({memwb_q.ld.valid, memwb_q.add.valid, memwb_q.mul.valid}));

  assign idle = !(|lb_busy) && !(|mrs_busy) && !(|ars_busy) && !(|wb_resv);

  logic unused_ok;
  assign unused_ok = ^{ifid_pc, mrs_pay, unit};
endmodule
