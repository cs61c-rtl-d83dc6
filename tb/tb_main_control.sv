// tb_main_control: compares the decoder's outputs for each of the seven instructions
// with the control table (entries marked "x" there are not checked), and checks that
// unknown opcodes and funct codes write neither registers nor memory and do not branch.
module tb_main_control;
  import cpu_pkg::*;
  logic [5:0] op, funct;
  ctrl_t      ctrl;
  int checks = 0, failures = 0;

  main_control dut (.op(op), .funct(funct), .ctrl(ctrl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected value per signal; 2 means "don't care"
  typedef struct {
    string   name;
    logic [5:0] op, fn;
    int regdst, alusrc, memtoreg, regwr, memwr, npcsel, jump, extop;
    int aluctr;   // 0 add, 1 sub, 2 or, 3 don't care
  } row_t;

  row_t rows [7] = '{
    '{"add", 6'b00_0000, 6'b10_0000, 1, 0, 0, 1, 0, 0, 0, 2, 0},
    '{"sub", 6'b00_0000, 6'b10_0010, 1, 0, 0, 1, 0, 0, 0, 2, 1},
    '{"ori", 6'b00_1101, 6'b00_0000, 0, 1, 0, 1, 0, 0, 0, 0, 2},
    '{"lw",  6'b10_0011, 6'b00_0000, 0, 1, 1, 1, 0, 0, 0, 1, 0},
    '{"sw",  6'b10_1011, 6'b00_0000, 2, 1, 2, 0, 1, 0, 0, 1, 0},
    '{"beq", 6'b00_0100, 6'b00_0000, 2, 0, 2, 0, 0, 1, 0, 2, 1},
    '{"j",   6'b00_0010, 6'b00_0000, 2, 2, 2, 0, 0, 0, 1, 2, 3}
  };

  task automatic cmp(input string inst, input string sig, input logic got, input int exp_v);
    if (exp_v == 2) return;
    checks++;
    if (got !== 1'(exp_v)) begin
      failures++; $display("FAIL %s %s got %b expected %0d", inst, sig, got, exp_v);
    end
  endtask

  initial begin
    foreach (rows[i]) begin
      for (int k = 0; k < 4; k++) begin
        op = rows[i].op;
        // for I/J formats the low bits are immediate bits: vary them
        funct = (rows[i].op == 6'b0 || k == 0) ? rows[i].fn : 6'($urandom);
        #1;
        cmp(rows[i].name, "RegDst",   ctrl.reg_dst,    rows[i].regdst);
        cmp(rows[i].name, "ALUSrc",   ctrl.alu_src,    rows[i].alusrc);
        cmp(rows[i].name, "MemtoReg", ctrl.mem_to_reg, rows[i].memtoreg);
        cmp(rows[i].name, "RegWrite", ctrl.reg_wr,     rows[i].regwr);
        cmp(rows[i].name, "MemWrite", ctrl.mem_wr,     rows[i].memwr);
        cmp(rows[i].name, "nPCsel",   ctrl.npc_sel,    rows[i].npcsel);
        cmp(rows[i].name, "Jump",     ctrl.jump,       rows[i].jump);
        cmp(rows[i].name, "ExtOp",    ctrl.ext_op == EXT_SIGN, rows[i].extop);
        if (rows[i].aluctr != 3) begin
          checks++;
          if (ctrl.alu_ctr !== (rows[i].aluctr == 0 ? ALU_ADD : rows[i].aluctr == 1 ? ALU_SUB : ALU_OR)) begin
            failures++; $display("FAIL %s ALUctr got %b", rows[i].name, ctrl.alu_ctr);
          end
        end
      end
    end
    // unknown encodings must not change state
    for (int i = 0; i < 200; i++) begin
      op = 6'($urandom); funct = 6'($urandom);
      if (op inside {6'b00_1101, 6'b10_0011, 6'b10_1011, 6'b00_0100, 6'b00_0010}) continue;
      if (op == 6'b0 && funct inside {6'b10_0000, 6'b10_0010}) continue;
      #1;
      checks++;
      if (ctrl.reg_wr || ctrl.mem_wr || ctrl.npc_sel || ctrl.jump) begin
        failures++; $display("FAIL unknown op=%b funct=%b changes state", op, funct);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
