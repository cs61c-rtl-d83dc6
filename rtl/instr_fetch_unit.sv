// instr_fetch_unit: program counter, next-address logic and instruction memory.
//
// Each cycle the unit presents Instruction = MEM[PC] and, at the rising clock edge,
// loads the PC with the next address:
//   nPC_MUX_sel = 0 : PC <- PC + 4
//   nPC_MUX_sel = 1 : PC <- PC + 4 + {SignExt(imm16), 00}
//   jump        = 1 : PC <- {(PC + 4)<31:28>, target<25:0>, 00}
// nPC_MUX_sel is nPC_sel AND Zero: the control asks for "Br" and the ALU reports that
// rs - rt was zero. Two adders ("+4" and the branch adder fed by the PC extender) run in
// parallel and a 2:1 mux picks between them. The PC's two low bits are always 00.
// The jump path and its target formula are this design's own addition (the control
// table has a Jump signal, and MIPS defines the target this way); the reset value of
// the PC is a parameter, and reset is active-low and synchronous.
module instr_fetch_unit
  import cpu_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter word_t       RESET_PC   = '0
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          npc_sel,   // 0: "+4", 1: "Br"
  input  logic                          zero,      // from the ALU
  input  logic                          jump,
  // instruction memory load port
  input  logic                          prog_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] prog_addr,
  input  word_t                         prog_data,
  output word_t                         pc,
  output word_t                         instruction
);
  logic [XLEN-3:0] pc_q;        // PC<31:2>; PC<1:0> = 00
  word_t           pc_plus4;
  word_t           pc_branch;
  word_t           pc_ext;      // {SignExt(imm16), 00}
  word_t           pc_mux;
  word_t           pc_next;
  logic            npc_mux_sel;

  assign pc = {pc_q, 2'b00};

  inst_memory #(.WORDS(IMEM_WORDS)) u_imem (
    .clk        (clk),
    .prog_we    (prog_we),
    .prog_addr  (prog_addr),
    .prog_data  (prog_data),
    .adr        (pc),
    .instruction(instruction)
  );

  // nPC_sel / Zero truth table: 0x -> 0, 10 -> 0, 11 -> 1
  assign npc_mux_sel = npc_sel & zero;

  assign pc_plus4  = pc + 32'd4;
  assign pc_ext    = {{14{instruction[15]}}, instruction[15:0], 2'b00};
  assign pc_branch = pc_plus4 + pc_ext;

  mux2 #(.WIDTH(XLEN)) u_npc_mux (
    .in0(pc_plus4),
    .in1(pc_branch),
    .sel(npc_mux_sel),
    .out(pc_mux)
  );

  assign pc_next = jump ? {pc_plus4[31:28], f_target(instruction), 2'b00} : pc_mux;

  always_ff @(posedge clk) begin
    if (!rst_n) pc_q <= RESET_PC[XLEN-1:2];
    else        pc_q <= pc_next[XLEN-1:2];
  end
endmodule
