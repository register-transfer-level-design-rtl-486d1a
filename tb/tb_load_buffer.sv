// Test of the load buffer (3 entries, locations 1..3).
// Directed: a lw whose base register is ready is offered at once with
// address base + offset (the design's test load 34(x2) with x2 = 2 gives
// 36); a lw whose base waits for location 6 is held until that write-back;
// a full buffer reports full; an entry is released by its own write-back.
// Random: the buffer runs against a behavioural model written here.
module tb_load_buffer;
  import riscv_ooo_pkg::*;
  localparam int N = 3, BASE = 1;
  logic clk = 0, rst = 1, alloc = 0, disp_ready = 0;
  word_t alloc_base = '0, alloc_offset = '0, load_addr;
  tag_t alloc_q = '0, alloc_tag, disp_tag;
  regidx_t alloc_rd = '0, disp_rd;
  logic full, disp_valid;
  cdb_t wb = '0;
  logic [N-1:0] busy_vec;
  int checks = 0, failures = 0;

  load_buffer #(.ENTRIES(N), .BASE(BASE)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  bit mbusy [N], msent [N]; word_t mbase [N], moff [N]; tag_t mq [N]; regidx_t mrd [N];

  initial begin
    for (int i = 0; i < N; i++) begin mbusy[i] = 0; msent[i] = 0; mq[i] = 0; end
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    check(!full && alloc_tag == 4'd1, "empty buffer offers location 1");
    alloc = 1; alloc_base = 2; alloc_q = 0; alloc_offset = 34; alloc_rd = 6;
    @(negedge clk);
    alloc_base = 0; alloc_q = 4'd6; alloc_offset = 32'hffff_fffc; alloc_rd = 9;   // -4(xN), xN pending
    #1 check(alloc_tag == 4'd2, "second location");
    @(negedge clk);
    alloc = 0; #1;
    check(disp_valid && load_addr == 36 && disp_rd == 6 && disp_tag == 4'd1, "ready load: 34 + 2");
    disp_ready = 1; @(negedge clk); #1;
    check(!disp_valid, "pending base is held");
    wb = '{valid: 1'b1, tag: 4'd6, rd: 5'd7, data: 32'd100};
    @(negedge clk); wb = '0; #1;
    check(disp_valid && load_addr == 96 && disp_rd == 9 && disp_tag == 4'd2, "woken load: 100 - 4");
    disp_ready = 0;
    alloc = 1; alloc_q = 4'd7; @(negedge clk); alloc = 0; #1;
    check(full, "full after three loads");
    wb = '{valid: 1'b1, tag: 4'd1, rd: 5'd6, data: 32'd7};
    @(negedge clk); wb = '0; #1;
    check(!full && alloc_tag == 4'd1 && !busy_vec[0], "location 1 released by its write-back");
    rst = 1; @(negedge clk); rst = 0;

    for (int n = 0; n < 3000; n++) begin
      int fi, di; bit ef, edv;
      alloc = $urandom_range(1);
      alloc_base = $urandom; alloc_offset = {{20{1'b0}}, 12'($urandom)}; alloc_rd = 5'($urandom);
      alloc_q = ($urandom_range(2) == 0) ? 4'($urandom_range(1, 8)) : 4'd0;
      disp_ready = $urandom_range(1);
      wb = '0;
      if ($urandom_range(1)) begin wb.valid = 1; wb.data = $urandom; wb.rd = 5'($urandom); wb.tag = 4'($urandom_range(1, 8)); end
      #1;
      ef = 1; fi = 0;
      for (int i = N - 1; i >= 0; i--) if (!mbusy[i]) begin ef = 0; fi = i; end
      edv = 0; di = 0;
      for (int i = N - 1; i >= 0; i--) if (mbusy[i] && !msent[i] && mq[i] == 0) begin edv = 1; di = i; end
      check(full == ef, "full");
      if (!ef) check(alloc_tag == tag_t'(BASE + fi), "alloc location");
      check(disp_valid == edv, "disp_valid");
      if (edv) check(load_addr == mbase[di] + moff[di] && disp_rd == mrd[di] && disp_tag == tag_t'(BASE + di),
                     "dispatch contents");
      for (int i = 0; i < N; i++) if (mbusy[i]) begin
        if (wb.valid && mq[i] != 0 && mq[i] == wb.tag) begin mbase[i] = wb.data; mq[i] = 0; end
        if (msent[i] && wb.valid && wb.tag == tag_t'(BASE + i)) begin mbusy[i] = 0; msent[i] = 0; end
      end
      if (edv && disp_ready) msent[di] = 1;
      if (alloc && !ef) begin
        mbusy[fi] = 1; msent[fi] = 0; moff[fi] = alloc_offset; mrd[fi] = alloc_rd;
        if (wb.valid && alloc_q != 0 && alloc_q == wb.tag) begin mbase[fi] = wb.data; mq[fi] = 0; end
        else begin mbase[fi] = alloc_base; mq[fi] = alloc_q; end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
