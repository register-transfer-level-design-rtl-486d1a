// Workload test: the five-instruction test program (lw, lw, mul, sub, sub)
// grown to 6, 7, 8, 9 and 10 instructions by appending independent ALU
// instructions (sub/add/xor/or/and on registers that the program does not
// write).  For every length the core runs from reset at its default
// parameters; all registers are compared with a sequential model, and the
// cycle of the last write-back is reported.  Because the appended
// instructions complete while the multiply is still in its 10-cycle delay,
// the total time must not grow with the length: the last write-back stays
// in cycle 21 (20 ns clock: 420 ns) for every length.
module tb_workload_scaling;
  import riscv_ooo_pkg::*;

  logic    clk = 1'b0, rst = 1'b1, run = 1'b0;
  logic    imem_we = 1'b0, dmem_we = 1'b0, rf_init_we = 1'b0;
  word_t   imem_waddr = '0, imem_wdata = '0, dmem_waddr = '0, dmem_wdata = '0;
  regidx_t rf_init_addr = '0, dbg_addr = '0;
  word_t   rf_init_data = '0, dbg_data;
  logic    dbg_busy, issue_stall, wb_slot_stall, idle;
  cdb_t    wb;

  riscv_ooo_top dut (.*);
  always #10 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t enc_r(input logic [6:0] f7, input int rs2, input int rs1,
                                  input logic [2:0] f3, input int rd);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), OPC_OP};
  endfunction
  function automatic word_t enc_lw(input int rd, input int rs1, input int imm);
    return {12'(imm), 5'(rs1), F3_LW, 5'(rd), OPC_LOAD};
  endfunction

  word_t ref_rf [32];
  word_t ref_dm [256];

  function automatic void ref_exec(input word_t ins);
    int rd, rs1, rs2; word_t a, b, r;
    rd = int'(ins[11:7]); rs1 = int'(ins[19:15]); rs2 = int'(ins[24:20]);
    a = ref_rf[rs1]; b = ref_rf[rs2];
    if (ins[6:0] == OPC_LOAD) r = ref_dm[((a + {{20{ins[31]}}, ins[31:20]}) >> 2) % 256];
    else if (ins[31:25] == F7_MULDIV) r = a * b;
    else case (ins[14:12])
      3'b000: r = (ins[31:25] == F7_ALT) ? a - b : a + b;
      3'b100: r = a ^ b;
      3'b110: r = a | b;
      default: r = a & b;
    endcase
    if (rd != 0) ref_rf[rd] = r;
  endfunction

  int cyc, n_wb, last_wb;
  bit running;
  always @(posedge clk) begin
    if (running) begin
      cyc++;
      if (wb.valid) begin n_wb++; last_wb = cyc; end
    end
  end

  word_t base [$], extra [$], prog [$];
  initial begin
    base  = {enc_lw(6, 2, 34), enc_lw(2, 3, 45), enc_r(F7_MULDIV, 4, 2, 3'b000, 11),
             enc_r(F7_ALT, 3, 6, 3'b000, 8), enc_r(F7_ALT, 2, 6, 3'b000, 10)};
    extra = {enc_r(F7_ALT, 3, 5, 3'b000, 12), enc_r(F7_BASE, 7, 1, 3'b000, 13),
             enc_r(F7_BASE, 9, 5, 3'b100, 14), enc_r(F7_BASE, 3, 7, 3'b110, 15),
             enc_r(F7_BASE, 9, 1, 3'b111, 16)};
    for (int len = 5; len <= 10; len++) begin
      prog = base;
      for (int k = 0; k < len - 5; k++) prog.push_back(extra[k]);
      foreach (ref_dm[i]) ref_dm[i] = '0;
      ref_dm[9] = 32'd7; ref_dm[12] = 32'd8;
      rst = 1'b1; run = 1'b0; running = 1'b0;
      repeat (2) @(posedge clk);
      #1 rst = 1'b0;
      for (int i = 1; i < 32; i++) begin
        @(negedge clk); rf_init_we = 1'b1; rf_init_addr = 5'(i); rf_init_data = word_t'(i);
        ref_rf[i] = word_t'(i);
      end
      ref_rf[0] = '0;
      @(negedge clk); rf_init_we = 1'b0;
      @(negedge clk); dmem_we = 1'b1; dmem_waddr = 32'd36; dmem_wdata = 32'd7;
      @(negedge clk); dmem_waddr = 32'd48; dmem_wdata = 32'd8;
      @(negedge clk); dmem_we = 1'b0;
      foreach (prog[i]) begin
        @(negedge clk); imem_we = 1'b1; imem_waddr = word_t'(i * 4); imem_wdata = prog[i];
      end
      @(negedge clk); imem_we = 1'b0;
      foreach (prog[i]) ref_exec(prog[i]);
      cyc = 0; n_wb = 0; last_wb = 0;
      @(negedge clk); run = 1'b1; running = 1'b1;
      while (n_wb < prog.size() && cyc < 200) @(posedge clk);
      repeat (3) @(posedge clk);
      running = 1'b0;
      check(n_wb == prog.size(), $sformatf("len %0d: %0d write-backs", len, n_wb));
      for (int i = 0; i < 32; i++) begin
        @(negedge clk); dbg_addr = 5'(i);
        #1 check(dbg_data == ref_rf[i] && !dbg_busy,
                 $sformatf("len %0d: x%0d = %h expected %h", len, i, dbg_data, ref_rf[i]));
      end
      check(last_wb == 21, $sformatf("len %0d: last write-back in cycle %0d, expected 21", len, last_wb));
      $display("instructions=%0d last_writeback_cycle=%0d time_ns=%0d", len, last_wb, last_wb * 20);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
