// main_control: decodes an instruction into the datapath's control points.
//
// The settings are the single-cycle control table:
//            add  sub  ori  lw   sw   beq  j
//   RegDst    1    1    0    0    x    x    x
//   ALUSrc    0    0    1    1    1    0    x
//   MemtoReg  0    0    0    1    x    x    x
//   RegWrite  1    1    1    1    0    0    0
//   MemWrite  0    0    0    0    1    0    0
//   nPC_sel   0    0    0    0    0    1    0
//   Jump      0    0    0    0    0    0    1
//   ExtOp     x    x  zero sign sign   x    x
//   ALUctr   add  sub   or  add  add  sub   x
// add and sub share op 00 0000 and are told apart by func. Every "x" is driven as 0
// (ExtOp "zero", ALUctr "add"). An opcode or R-type func outside this subset writes
// nothing and falls through to PC + 4, a choice of this design. Purely combinational;
// two immediate assertions check that the write enables and the two PC overrides are
// never asserted together.
module main_control
  import cpu_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  output ctrl_t      ctrl
);
  always_comb begin
    ctrl = '{reg_dst: 1'b0, alu_src: 1'b0, mem_to_reg: 1'b0, reg_wr: 1'b0,
             mem_wr: 1'b0, npc_sel: 1'b0, jump: 1'b0, ext_op: EXT_ZERO,
             alu_ctr: ALU_ADD};
    case (op)
      OP_RTYPE: begin
        if (funct == FUNCT_ADD || funct == FUNCT_SUB) begin
          ctrl.reg_dst = 1'b1;
          ctrl.reg_wr  = 1'b1;
          ctrl.alu_ctr = (funct == FUNCT_SUB) ? ALU_SUB : ALU_ADD;
        end
      end
      OP_ORI: begin
        ctrl.alu_src = 1'b1;
        ctrl.reg_wr  = 1'b1;
        ctrl.ext_op  = EXT_ZERO;
        ctrl.alu_ctr = ALU_OR;
      end
      OP_LW: begin
        ctrl.alu_src    = 1'b1;
        ctrl.mem_to_reg = 1'b1;
        ctrl.reg_wr     = 1'b1;
        ctrl.ext_op     = EXT_SIGN;
        ctrl.alu_ctr    = ALU_ADD;
      end
      OP_SW: begin
        ctrl.alu_src = 1'b1;
        ctrl.mem_wr  = 1'b1;
        ctrl.ext_op  = EXT_SIGN;
        ctrl.alu_ctr = ALU_ADD;
      end
      OP_BEQ: begin
        ctrl.npc_sel = 1'b1;
        ctrl.alu_ctr = ALU_SUB;
      end
      OP_J: begin
        ctrl.jump = 1'b1;
      end
      default: ;
    endcase
  end

  // No instruction of the table writes both a register and memory, or both branches
  // and jumps.
  always_comb begin
    assert (!(ctrl.reg_wr && ctrl.mem_wr)) else $error("RegWr and MemWr both set");
    assert (!(ctrl.npc_sel && ctrl.jump))  else $error("nPC_sel and Jump both set");
  end
endmodule
