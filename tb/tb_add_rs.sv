// Test of the adder reservation station (reservation_station with
// N=3, locations 6..8).
// A directed part issues a dependent instruction, checks that it waits
// until its producer's result appears on the write-back bus, that entries
// take the reference location numbers, that the station reports full and
// that an entry is released by its own write-back.  A random part runs the
// station against a behavioural model written in this file, comparing full,
// allocation location, and the dispatched operands, rd, location and
// payload every cycle.
module tb_add_rs;
  import riscv_ooo_pkg::*;
  localparam int N = 3, BASE = 6, PAY_W = 19;
  logic clk = 0, rst = 1;
  logic alloc = 0, disp_ready = 0;
  word_t alloc_vj = '0, alloc_vk = '0;
  tag_t alloc_qj = '0, alloc_qk = '0;
  regidx_t alloc_rd = '0;
  logic [PAY_W-1:0] alloc_pay = '0;
  logic full, disp_valid;
  tag_t alloc_tag, disp_tag;
  cdb_t wb = '0;
  word_t disp_vj, disp_vk;
  regidx_t disp_rd;
  logic [PAY_W-1:0] disp_pay;
  logic [N-1:0] busy_vec;
  int checks = 0, failures = 0;

  reservation_station #(.N(N), .BASE(BASE), .PAY_W(PAY_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // model
  bit mbusy [N], msent [N];
  word_t mvj [N], mvk [N]; tag_t mqj [N], mqk [N]; regidx_t mrd [N]; logic [PAY_W-1:0] mpay [N];

  task automatic model_reset();
    for (int i = 0; i < N; i++) begin mbusy[i] = 0; msent[i] = 0; mqj[i] = 0; mqk[i] = 0; end
  endtask

  initial begin
    model_reset();
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    // ---------- directed: dependent instruction waits for tag 2
    check(!full && alloc_tag == tag_t'(BASE) && !disp_valid, "empty station");
    alloc = 1; alloc_vj = 0; alloc_qj = 4'd2; alloc_vk = 32'd4; alloc_qk = 0; alloc_rd = 5'd11;
    alloc_pay = PAY_W'(1);
    @(negedge clk);
    alloc = 0;
    check(busy_vec[0] && alloc_tag == tag_t'(BASE + 1), "first entry taken, next location offered");
    repeat (3) begin
      disp_ready = 1; #1;
      check(!disp_valid, "waits for its operand");
      @(negedge clk);
    end
    wb = '{valid: 1'b1, tag: 4'd2, rd: 5'd2, data: 32'd8};
    @(negedge clk);
    wb = '0; #1;
    check(disp_valid && disp_vj == 8 && disp_vk == 4 && disp_rd == 11 && disp_tag == tag_t'(BASE),
          "woken by the write-back of location 2");
    @(negedge clk);
    #1 check(!disp_valid && busy_vec[0], "sent entry stays busy until its write-back");
    // fill the station
    for (int i = 1; i < N; i++) begin
      alloc = 1; alloc_qj = 4'd3; alloc_qk = 0; alloc_rd = 5'(20 + i); @(negedge clk);
    end
    alloc = 0; #1;
    check(full, "station full");
    wb = '{valid: 1'b1, tag: tag_t'(BASE), rd: 5'd11, data: 32'h20};
    @(negedge clk); wb = '0; #1;
    check(!full && !busy_vec[0] && alloc_tag == tag_t'(BASE), "released by own write-back");
    disp_ready = 0;
    rst = 1; @(negedge clk); rst = 0;

    // ---------- random, against the model
    for (int n = 0; n < 3000; n++) begin
      int fi, di; bit ef, edv;
      alloc = $urandom_range(1);
      alloc_vj = $urandom; alloc_vk = $urandom; alloc_rd = 5'($urandom); alloc_pay = PAY_W'($urandom);
      alloc_qj = ($urandom_range(2) == 0) ? 4'($urandom_range(1, 8)) : 4'd0;
      alloc_qk = ($urandom_range(2) == 0) ? 4'($urandom_range(1, 8)) : 4'd0;
      disp_ready = $urandom_range(1);
      wb = '0;
      if ($urandom_range(1)) begin
        wb.valid = 1; wb.data = $urandom; wb.rd = 5'($urandom);
        wb.tag = 4'($urandom_range(1, 8));
      end
      #1;
      ef = 1; fi = 0;
      for (int i = N - 1; i >= 0; i--) if (!mbusy[i]) begin ef = 0; fi = i; end
      edv = 0; di = 0;
      for (int i = N - 1; i >= 0; i--) if (mbusy[i] && !msent[i] && mqj[i] == 0 && mqk[i] == 0) begin edv = 1; di = i; end
      check(full == ef, "full");
      if (!ef) check(alloc_tag == tag_t'(BASE + fi), "alloc location");
      check(disp_valid == edv, "disp_valid");
      if (edv) check(disp_vj == mvj[di] && disp_vk == mvk[di] && disp_rd == mrd[di] &&
                     disp_tag == tag_t'(BASE + di) && disp_pay == mpay[di], "dispatch contents");
      // model update
      for (int i = 0; i < N; i++) if (mbusy[i]) begin
        if (wb.valid && mqj[i] != 0 && mqj[i] == wb.tag) begin mvj[i] = wb.data; mqj[i] = 0; end
        if (wb.valid && mqk[i] != 0 && mqk[i] == wb.tag) begin mvk[i] = wb.data; mqk[i] = 0; end
        if (msent[i] && wb.valid && wb.tag == tag_t'(BASE + i)) begin mbusy[i] = 0; msent[i] = 0; end
      end
      if (edv && disp_ready) msent[di] = 1;
      if (alloc && !ef) begin
        mbusy[fi] = 1; msent[fi] = 0; mrd[fi] = alloc_rd; mpay[fi] = alloc_pay;
        if (wb.valid && alloc_qj != 0 && alloc_qj == wb.tag) begin mvj[fi] = wb.data; mqj[fi] = 0; end
        else begin mvj[fi] = alloc_vj; mqj[fi] = alloc_qj; end
        if (wb.valid && alloc_qk != 0 && alloc_qk == wb.tag) begin mvk[fi] = wb.data; mqk[fi] = 0; end
        else begin mvk[fi] = alloc_vk; mqk[fi] = alloc_qk; end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
