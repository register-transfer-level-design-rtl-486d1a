// End-to-end test of the out-of-order core at its default parameters.
//
// Two programs run from reset:
//  A  the five-instruction test program of the design (two loads, a mul
//     that depends on the second load, two subs).  Final register values
//     and the write-back cycle of every result are checked against numbers
//     worked out by hand for this pipeline (cycle 1 = first cycle with run
//     high): x6 @6, x2 @7, x8 @10, x10 @11, x11 @21.  In cycle 6 the
//     pending registers must show their producer's location.
//  B  a longer mix of loads, muls and ALU operations that fills the multiply
//     reservation station, collides results on the write-back bus, and
//     writes one register twice (mul then add).
// Final register contents are compared with a sequential instruction-level
// model in this file.  The test also counts how often each mechanism
// happened: issue stall on a full buffer, write-back slot stall, operand
// waiting on a producer tag, forwarding from the write-back bus at issue,
// out-of-order completion, load-before-add dispatch priority.  A mechanism
// that never happened counts as a failure.
module tb_riscv_ooo_top;
  import riscv_ooo_pkg::*;

  logic    clk = 1'b0, rst = 1'b1, run = 1'b0;
  logic    imem_we = 1'b0, dmem_we = 1'b0, rf_init_we = 1'b0;
  word_t   imem_waddr = '0, imem_wdata = '0, dmem_waddr = '0, dmem_wdata = '0;
  regidx_t rf_init_addr = '0, dbg_addr = '0;
  word_t   rf_init_data = '0, dbg_data;
  logic    dbg_busy, issue_stall, wb_slot_stall, idle;
  cdb_t    wb;

  riscv_ooo_top dut (.*);

  always #10 clk = ~clk;   // 20 ns clock

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ encoding
  function automatic word_t enc_r(input logic [6:0] f7, input int rs2, input int rs1,
                                  input logic [2:0] f3, input int rd);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), OPC_OP};
  endfunction
  function automatic word_t enc_lw(input int rd, input int rs1, input int imm);
    return {12'(imm), 5'(rs1), F3_LW, 5'(rd), OPC_LOAD};
  endfunction
  function automatic word_t ADD(input int rd, rs1, rs2); return enc_r(F7_BASE, rs2, rs1, 3'b000, rd); endfunction
  function automatic word_t SUB(input int rd, rs1, rs2); return enc_r(F7_ALT,  rs2, rs1, 3'b000, rd); endfunction
  function automatic word_t AND(input int rd, rs1, rs2); return enc_r(F7_BASE, rs2, rs1, 3'b111, rd); endfunction
  function automatic word_t OR (input int rd, rs1, rs2); return enc_r(F7_BASE, rs2, rs1, 3'b110, rd); endfunction
  function automatic word_t XOR(input int rd, rs1, rs2); return enc_r(F7_BASE, rs2, rs1, 3'b100, rd); endfunction
  function automatic word_t SLL(input int rd, rs1, rs2); return enc_r(F7_BASE, rs2, rs1, 3'b001, rd); endfunction
  function automatic word_t SLT(input int rd, rs1, rs2); return enc_r(F7_BASE, rs2, rs1, 3'b010, rd); endfunction
  function automatic word_t SRA(input int rd, rs1, rs2); return enc_r(F7_ALT,  rs2, rs1, 3'b101, rd); endfunction
  function automatic word_t MUL(input int rd, rs1, rs2); return enc_r(F7_MULDIV, rs2, rs1, 3'b000, rd); endfunction

  // ------------------------------------------------ reference (sequential)
  word_t ref_rf [32];
  word_t ref_dm [256];

  function automatic void ref_exec(input word_t ins);
    logic [6:0] op, f7; logic [2:0] f3; int rd, rs1, rs2;
    word_t a, b, r; word_t imm;
    op = ins[6:0]; rd = int'(ins[11:7]); f3 = ins[14:12]; rs1 = int'(ins[19:15]); rs2 = int'(ins[24:20]); f7 = ins[31:25];
    a = ref_rf[rs1]; b = ref_rf[rs2];
    imm = {{20{ins[31]}}, ins[31:20]};
    r = '0;
    if (op == OPC_LOAD) r = ref_dm[((a + imm) >> 2) % 256];
    else if (f7 == F7_MULDIV) r = a * b;
    else case (f3)
      3'b000: r = (f7 == F7_ALT) ? a - b : a + b;
      3'b001: r = a << b[4:0];
      3'b010: r = ($signed(a) < $signed(b)) ? 1 : 0;
      3'b011: r = (a < b) ? 1 : 0;
      3'b100: r = a ^ b;
      3'b101: r = (f7 == F7_ALT) ? word_t'($signed(a) >>> b[4:0]) : a >> b[4:0];
      3'b110: r = a | b;
      default: r = a & b;
    endcase
    if (rd != 0) ref_rf[rd] = r;
  endfunction

  // -------------------------------------------------------------- monitors
  int cyc;
  bit running;
  int wb_cycle [32];
  word_t prog [$];
  bit done_i [$];
  int n_wb;
  int n_issue_stall, n_slot_stall, n_operand_wait, n_issue_forward, n_ooo, n_load_prio;

  always @(posedge clk) begin
    if (running) begin
      cyc++;
      if (issue_stall) n_issue_stall++;
      if (wb_slot_stall) n_slot_stall++;
      if (dut.u_lb.disp_valid && dut.u_ars.disp_valid && !dut.wb_resv[3]) n_load_prio++;
      if ((dut.lb_alloc || dut.mrs_alloc || dut.ars_alloc) &&
          (dut.q_1 != TAG_NONE || (dut.q_2 != TAG_NONE && !dut.lb_alloc))) n_operand_wait++;
      if ((dut.lb_alloc || dut.mrs_alloc || dut.ars_alloc) && wb.valid &&
          ((dut.rs1 != 0 && dut.u_regstat.result_busy[dut.rs1] && dut.u_regstat.store_rd_id[dut.rs1] == wb.tag) ||
           (dut.rs2 != 0 && !dut.lb_alloc && dut.u_regstat.result_busy[dut.rs2] &&
            dut.u_regstat.store_rd_id[dut.rs2] == wb.tag)))
        n_issue_forward++;
      if (wb.valid) begin
        int oldest, match;
        n_wb++;
        wb_cycle[wb.rd] = cyc;
        oldest = -1; match = -1;
        foreach (done_i[i]) begin
          if (!done_i[i] && oldest < 0) oldest = i;
          if (!done_i[i] && match < 0 && int'(prog[i][11:7]) == int'(wb.rd)) match = i;
        end
        if (match >= 0) begin
          done_i[match] = 1'b1;
          if (match != oldest) n_ooo++;
        end
      end
    end
  end

  // Program A, after the edge of cycle 6: pending registers show the
  // location of their producer in the pointer/result field (x2 <- load
  // buffer 2, x11 <- multiply station 4, x8 <- adder station 6, x10 <- adder
  // station 7), while x6 already holds its loaded value.
  bit check_pointers;
  always @(negedge clk) begin
    if (running && check_pointers && cyc == 6) begin
      check(dut.u_regstat.value[6] == 7 && !dut.u_regstat.result_busy[6], "A@6: x6 holds 7");
      check(dut.u_regstat.value[2] == 2 && dut.u_regstat.result_busy[2], "A@6: x2 points to location 2");
      check(dut.u_regstat.value[11] == 4 && dut.u_regstat.result_busy[11], "A@6: x11 points to location 4");
      check(dut.u_regstat.value[8] == 6 && dut.u_regstat.result_busy[8], "A@6: x8 points to location 6");
      check(dut.u_regstat.value[10] == 7 && dut.u_regstat.result_busy[10], "A@6: x10 points to location 7");
    end
  end

  // ------------------------------------------------------------- running
  task automatic load_and_run(input word_t p [$], input int max_cycles);
    rst = 1'b1; run = 1'b0; running = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    prog = p;
    done_i = {};
    foreach (p[i]) done_i.push_back(1'b0);
    for (int i = 1; i < 32; i++) begin
      @(negedge clk); rf_init_we = 1'b1; rf_init_addr = 5'(i); rf_init_data = word_t'(i);
      ref_rf[i] = word_t'(i);
    end
    ref_rf[0] = '0;
    @(negedge clk); rf_init_we = 1'b0;
    foreach (ref_dm[i]) begin
      @(negedge clk); dmem_we = 1'b1; dmem_waddr = word_t'(i * 4); dmem_wdata = ref_dm[i];
    end
    @(negedge clk); dmem_we = 1'b0;
    foreach (p[i]) begin
      @(negedge clk); imem_we = 1'b1; imem_waddr = word_t'(i * 4); imem_wdata = p[i];
    end
    @(negedge clk); imem_we = 1'b0;
    foreach (p[i]) ref_exec(p[i]);
    foreach (wb_cycle[i]) wb_cycle[i] = 0;
    cyc = 0; n_wb = 0;
    @(negedge clk); run = 1'b1; running = 1'b1;
    while (n_wb < p.size() && cyc < max_cycles) @(posedge clk);
    repeat (4) @(posedge clk);
    running = 1'b0;
  endtask

  task automatic compare_regs(input string name);
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); dbg_addr = 5'(i);
      #1 check(dbg_data == ref_rf[i] && !dbg_busy,
               $sformatf("%s: x%0d = %h busy %0b, expected %h", name, i, dbg_data, dbg_busy, ref_rf[i]));
    end
  endtask

  word_t pa [$], pb [$];
  int last;
  initial begin
    // data: word addresses 9 and 12 are the load targets of program A
    foreach (ref_dm[i]) ref_dm[i] = word_t'(32'h100 + i * 3);
    ref_dm[9]  = 32'd7;    // lw x6, 34(x2) with x2 = 2  -> byte 36
    ref_dm[12] = 32'd8;    // lw x2, 45(x3) with x3 = 3  -> byte 48

    // ---------------- program A
    pa = {enc_lw(6, 2, 34), enc_lw(2, 3, 45), MUL(11, 2, 4), SUB(8, 6, 3), SUB(10, 6, 2)};
    check_pointers = 1'b1;
    load_and_run(pa, 200);
    check_pointers = 1'b0;
    check(n_wb == 5, $sformatf("A: %0d write-backs, expected 5", n_wb));
    compare_regs("A");
    check(ref_rf[6] == 7 && ref_rf[2] == 8 && ref_rf[11] == 32'h20 && ref_rf[8] == 4 &&
          ref_rf[10] == 32'hffff_ffff, "A: reference values 7, 8, 0x20, 4, -1");
    check(wb_cycle[6]  == 6,  $sformatf("A: x6 written in cycle %0d, expected 6",  wb_cycle[6]));
    check(wb_cycle[2]  == 7,  $sformatf("A: x2 written in cycle %0d, expected 7",  wb_cycle[2]));
    check(wb_cycle[8]  == 10, $sformatf("A: x8 written in cycle %0d, expected 10", wb_cycle[8]));
    check(wb_cycle[10] == 11, $sformatf("A: x10 written in cycle %0d, expected 11", wb_cycle[10]));
    check(wb_cycle[11] == 21, $sformatf("A: x11 written in cycle %0d, expected 21", wb_cycle[11]));
    check(wb_cycle[11] - wb_cycle[2] == MUL_DELAY_EXPECT + 4,
          "A: mul completes 14 cycles after its operand is written");
    $display("A: x6@%0d x2@%0d x8@%0d x10@%0d x11@%0d", wb_cycle[6], wb_cycle[2], wb_cycle[8],
             wb_cycle[10], wb_cycle[11]);

    // ---------------- program B
    pb = {enc_lw(5, 0, 0), MUL(6, 5, 2), MUL(7, 3, 4), MUL(8, 6, 7),
          ADD(9, 1, 2), SUB(10, 9, 3), AND(11, 10, 5), OR(12, 1, 4), XOR(13, 12, 2),
          ADD(14, 1, 1), SLL(15, 1, 3), SLT(16, 10, 4), ADD(17, 8, 1),
          MUL(20, 1, 2), ADD(20, 3, 4), ADD(21, 20, 1), SRA(22, 10, 1),
          enc_lw(23, 4, 8), ADD(24, 23, 1), ADD(25, 2, 2), ADD(26, 3, 3), ADD(27, 4, 4),
          ADD(28, 5, 5), SUB(29, 6, 1), ADD(30, 7, 7), XOR(31, 1, 3), ADD(18, 24, 25)};
    load_and_run(pb, 600);
    check(n_wb == pb.size(), $sformatf("B: %0d write-backs, expected %0d", n_wb, pb.size()));
    compare_regs("B");

    $display("mechanisms: issue_stall=%0d wb_slot_stall=%0d operand_wait=%0d issue_forward=%0d out_of_order=%0d load_priority=%0d",
             n_issue_stall, n_slot_stall, n_operand_wait, n_issue_forward, n_ooo, n_load_prio);
    check(n_issue_stall   > 0, "issue stall on a full buffer never happened");
    check(n_slot_stall    > 0, "write-back slot stall never happened");
    check(n_operand_wait  > 0, "operand wait never happened");
    check(n_issue_forward > 0, "forwarding at issue never happened");
    check(n_ooo           > 0, "out-of-order completion never happened");
    check(n_load_prio     > 0, "load/add dispatch contention never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int MUL_DELAY_EXPECT = 10;
endmodule
