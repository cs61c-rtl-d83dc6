// tb_alu: checks add, subtract and OR on random and corner operands against reference
// arithmetic, and the Zero flag (set exactly when the result is zero, e.g. a - a).
module tb_alu;
  import cpu_pkg::*;
  word_t    a, b, result, expect_v;
  alu_ctr_e alu_ctr;
  logic     zero;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .alu_ctr(alu_ctr), .result(result), .zero(zero));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input word_t x, input word_t y, input alu_ctr_e op);
    a = x; b = y; alu_ctr = op;
    #1;
    case (op)
      ALU_ADD: expect_v = x + y;
      ALU_SUB: expect_v = x + ~y + 32'd1;
      default: expect_v = x | y;
    endcase
    checks++;
    if (result !== expect_v || zero !== (expect_v == 32'd0)) begin
      failures++;
      $display("FAIL a=%h b=%h op=%b result=%h zero=%b expected %h", x, y, op, result, zero, expect_v);
    end
  endtask

  initial begin
    word_t r;
    check(32'd5, 32'd5, ALU_SUB);
    check(32'd5, 32'd6, ALU_SUB);
    check(32'hffff_ffff, 32'd1, ALU_ADD);
    check(32'h0, 32'h0, ALU_OR);
    check(32'h8000_0000, 32'h8000_0000, ALU_ADD);
    check(32'h1234_0000, 32'h0000_5678, ALU_OR);
    for (int i = 0; i < 300; i++) begin
      r = $urandom;
      check(r, $urandom, ALU_ADD);
      check(r, $urandom, ALU_SUB);
      check(r, r, ALU_SUB);
      check(r, $urandom, ALU_OR);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
