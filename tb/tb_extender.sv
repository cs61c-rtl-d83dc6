// tb_extender: checks zero and sign extension of 16-bit immediates, including the
// boundary values 0x0000, 0x7fff, 0x8000 and 0xffff and random values.
module tb_extender;
  import cpu_pkg::*;
  logic [15:0] imm16;
  ext_op_e     ext_op;
  word_t       imm32, expect_v;
  int checks = 0, failures = 0;

  extender dut (.imm16(imm16), .ext_op(ext_op), .imm32(imm32));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] v, input ext_op_e op);
    imm16 = v; ext_op = op;
    #1;
    if (op == EXT_SIGN) expect_v = (v[15] == 1'b1) ? (32'hffff_0000 | 32'(v)) : 32'(v);
    else                expect_v = 32'(v);
    checks++;
    if (imm32 !== expect_v) begin
      failures++;
      $display("FAIL imm16=%h op=%0d got %h expected %h", v, op, imm32, expect_v);
    end
  endtask

  initial begin
    foreach (imm16_list[i]) begin
      check(imm16_list[i], EXT_ZERO);
      check(imm16_list[i], EXT_SIGN);
    end
    for (int i = 0; i < 200; i++) begin
      check(16'($urandom), EXT_ZERO);
      check(16'($urandom), EXT_SIGN);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] imm16_list [4] = '{16'h0000, 16'h7fff, 16'h8000, 16'hffff};
endmodule
