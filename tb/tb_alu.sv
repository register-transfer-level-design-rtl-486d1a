// Test of the adder unit (ALU): random and corner operands for every
// operation, compared with expressions evaluated here.
module tb_alu;
  import riscv_ooo_pkg::*;
  word_t a, b, result; alu_op_e op;
  int checks = 0, failures = 0;

  alu dut (.*);

  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic word_t expect_of(alu_op_e o, word_t x, word_t y);
    longint sx = longint'($signed(x)), sy = longint'($signed(y));
    case (o)
      ALU_AND: return x & y;
      ALU_OR:  return x | y;
      ALU_XOR: return x ^ y;
      ALU_ADD: return word_t'(64'(x) + 64'(y));
      ALU_SUB: return word_t'(64'(x) - 64'(y));
      ALU_SLL: return word_t'(64'(x) << y[4:0]);
      ALU_SRL: return x >> y[4:0];
      ALU_SRA: return word_t'(sx >>> y[4:0]);
      ALU_SLT: return (sx < sy) ? 32'd1 : 32'd0;
      ALU_SLTU: return (64'(x) < 64'(y)) ? 32'd1 : 32'd0;
      default: return '0;
    endcase
  endfunction

  alu_op_e ops [10] = '{ALU_AND, ALU_OR, ALU_ADD, ALU_XOR, ALU_SLL, ALU_SRL, ALU_SUB, ALU_SLT, ALU_SRA, ALU_SLTU};
  word_t corners [6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h8000_0000, 32'h7fff_ffff, 32'h0000_001f};
  initial begin
    foreach (ops[k]) begin
      foreach (corners[i]) foreach (corners[j]) begin
        op = ops[k]; a = corners[i]; b = corners[j]; #1;
        checks++; if (result != expect_of(op, a, b)) begin failures++; $display("FAIL: op %0d %h %h -> %h", op, a, b, result); end
      end
      for (int n = 0; n < 200; n++) begin
        op = ops[k]; a = $urandom; b = $urandom; #1;
        checks++; if (result != expect_of(op, a, b)) begin failures++; $display("FAIL: op %0d %h %h -> %h", op, a, b, result); end
      end
    end
    // the design's test values: 7 - 3 and 7 - 8
    op = ALU_SUB; a = 7; b = 3; #1; checks++; if (result != 4) failures++;
    op = ALU_SUB; a = 7; b = 8; #1; checks++; if (result != 32'hffff_ffff) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
