// single_cycle_cpu: a single-cycle processor for the MIPS subset add, sub, ori, lw, sw,
// beq and j.
//
// The instruction fetch unit presents Instruction<31:0> = MEM[PC]; its fields
// op<31:26>, rs<25:21>, rt<20:16>, rd<15:11>, imm16<15:0> and funct<5:0> go to the
// main control and the datapath. Control turns op/funct into RegDst, ALUSrc, MemtoReg,
// RegWr, MemWr, nPC_sel, Jump, ExtOp and ALUctr; the datapath executes and returns Zero,
// which the fetch unit ANDs with nPC_sel to take a branch. Every instruction takes
// exactly one clock: all state (PC, registers, data memory) updates at the same rising
// edge. The longest path is lw: PC clock-to-out, instruction memory, register file read,
// 32-bit add, data memory read, register file setup.
//
// Interface: clk; rst_n (active-low, synchronous, PC <- RESET_PC; while it is low no
// register or memory write takes place); a word-addressed load port into the
// instruction memory (prog_*), used while the processor is held in reset; pc,
// instruction, alu_out and bus_w for observation. The load port, the reset and the
// memory depths are this design's own choices.
module single_cycle_cpu
  import cpu_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter word_t       RESET_PC   = '0
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          prog_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] prog_addr,
  input  word_t                         prog_data,
  output word_t                         pc,
  output word_t                         instruction,
  output word_t                         alu_out,
  output word_t                         bus_w
);
  ctrl_t ctrl;      // decoder output
  ctrl_t ctrl_dp;   // as applied to the datapath: no writes during reset
  logic  zero;

  always_comb begin
    ctrl_dp        = ctrl;
    ctrl_dp.reg_wr = ctrl.reg_wr & rst_n;
    ctrl_dp.mem_wr = ctrl.mem_wr & rst_n;
  end

  instr_fetch_unit #(.IMEM_WORDS(IMEM_WORDS), .RESET_PC(RESET_PC)) u_ifu (
    .clk        (clk),
    .rst_n      (rst_n),
    .npc_sel    (ctrl.npc_sel),
    .zero       (zero),
    .jump       (ctrl.jump),
    .prog_we    (prog_we),
    .prog_addr  (prog_addr),
    .prog_data  (prog_data),
    .pc         (pc),
    .instruction(instruction)
  );

  main_control u_ctrl (
    .op   (f_op(instruction)),
    .funct(f_funct(instruction)),
    .ctrl (ctrl)
  );

  datapath #(.DMEM_WORDS(DMEM_WORDS)) u_dp (
    .clk    (clk),
    .rs     (f_rs(instruction)),
    .rt     (f_rt(instruction)),
    .rd     (f_rd(instruction)),
    .imm16  (f_imm16(instruction)),
    .ctrl   (ctrl_dp),
    .zero   (zero),
    .alu_out(alu_out),
    .bus_w  (bus_w)
  );
endmodule
