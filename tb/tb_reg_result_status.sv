// Test of the register result status against a model kept in this file.
// Random cycles of renames (issue), write-backs with random or matching
// tags, and preloads are applied; after every cycle all 32 registers are
// read back (value/pointer field and busy flag), and both read ports are
// checked combinationally, including forwarding of a same-cycle write-back.
module tb_reg_result_status;
  import riscv_ooo_pkg::*;
  logic clk = 0, rst = 1;
  regidx_t rs1 = '0, rs2 = '0, ren_rd = '0, init_addr = '0, dbg_addr = '0;
  word_t data_1, data_2, init_data = '0, dbg_data;
  tag_t q_1, q_2, ren_tag = '0;
  logic ren_valid = 0, init_we = 0, dbg_busy;
  cdb_t wb = '0;
  int checks = 0, failures = 0;

  reg_result_status dut (.*);
  always #50 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  word_t mv [32]; bit mb [32]; tag_t mt [32];

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic check_port(input regidx_t r, input word_t d, input tag_t q);
    word_t ed; tag_t eq;
    if (r == 0) begin ed = 0; eq = 0; end
    else if (!mb[r]) begin ed = mv[r]; eq = 0; end
    else if (wb.valid && wb.tag == mt[r]) begin ed = wb.data; eq = 0; end
    else begin ed = 0; eq = mt[r]; end
    check(q == eq && (eq != 0 || d == ed), $sformatf("read x%0d: %h/%0d expected %h/%0d", r, d, q, ed, eq));
  endtask

  initial begin
    foreach (mv[i]) begin mv[i] = 0; mb[i] = 0; mt[i] = 0; end
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    for (int i = 1; i < 32; i++) begin
      init_we = 1; init_addr = 5'(i); init_data = word_t'(i); @(negedge clk);
      mv[i] = i;
    end
    init_we = 0;
    for (int n = 0; n < 1500; n++) begin
      ren_valid = ($urandom_range(2) == 0);
      ren_rd = 5'($urandom); ren_tag = 4'($urandom_range(1, 8));
      wb = '0;
      if ($urandom_range(1) == 1) begin
        wb.valid = 1; wb.rd = 5'($urandom); wb.data = $urandom;
        wb.tag = ($urandom_range(3) != 0) ? mt[wb.rd] : 4'($urandom_range(1, 8));
      end
      init_we = ($urandom_range(20) == 0); init_addr = 5'($urandom); init_data = $urandom;
      rs1 = 5'($urandom); rs2 = 5'($urandom);
      #1;
      check_port(rs1, data_1, q_1);
      check_port(rs2, data_2, q_2);
      // model update, same priority as the design: write-back, rename, preload
      if (wb.valid && wb.rd != 0 && mb[wb.rd] && mt[wb.rd] == wb.tag) begin
        mv[wb.rd] = wb.data; mb[wb.rd] = 0; mt[wb.rd] = 0;
      end
      if (ren_valid && ren_rd != 0) begin mv[ren_rd] = word_t'(ren_tag); mb[ren_rd] = 1; mt[ren_rd] = ren_tag; end
      if (init_we && init_addr != 0) begin mv[init_addr] = init_data; mb[init_addr] = 0; mt[init_addr] = 0; end
      @(negedge clk);
      ren_valid = 0; init_we = 0; wb = '0;
      for (int r = 0; r < 32; r += 1 + (n % 5)) begin
        dbg_addr = 5'(r); #1;
        check(dbg_data == mv[r] && dbg_busy == mb[r],
              $sformatf("x%0d: %h/%0b expected %h/%0b", r, dbg_data, dbg_busy, mv[r], mb[r]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
