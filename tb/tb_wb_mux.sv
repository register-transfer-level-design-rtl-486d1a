// Test of the write-back mux: with each single select signal high the bus
// carries that source's data, tag and rd; with none it is invalid.
module tb_wb_mux;
  import riscv_ooo_pkg::*;
  logic lw_signal, adder_signal, multiply_signal;
  word_t read_data, adder_result_mem, multiplier_result;
  tag_t load_tag, adder_tag, multiply_tag;
  regidx_t rd_load, rd_adder, rd_multiply;
  cdb_t wb;
  int checks = 0, failures = 0;

  wb_mux dut (.*);

  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      automatic int s = $urandom_range(3);
      read_data = $urandom; adder_result_mem = $urandom; multiplier_result = $urandom;
      load_tag = 4'($urandom); adder_tag = 4'($urandom); multiply_tag = 4'($urandom);
      rd_load = 5'($urandom); rd_adder = 5'($urandom); rd_multiply = 5'($urandom);
      lw_signal = (s == 1); adder_signal = (s == 2); multiply_signal = (s == 3);
      #1;
      checks++;
      case (s)
        0: if (wb.valid) failures++;
        1: if (wb != '{1'b1, load_tag, rd_load, read_data}) failures++;
        2: if (wb != '{1'b1, adder_tag, rd_adder, adder_result_mem}) failures++;
        default: if (wb != '{1'b1, multiply_tag, rd_multiply, multiplier_result}) failures++;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
