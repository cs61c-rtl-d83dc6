// cpu_pkg: types and constants shared by the single-cycle MIPS-subset processor.
//
// The instruction fields follow the MIPS R/I/J formats: op<31:26>, rs<25:21>, rt<20:16>,
// rd<15:11>, shamt<10:6>, funct<5:0>, immediate<15:0>, target<25:0>. The opcode and funct
// values are the MIPS ones for add (op 0, funct 10 0000), sub (op 0, funct 10 0010),
// ori (00 1101), lw (10 0011), sw (10 1011), beq (00 0100) and j (00 0010).
// The 3-bit ALUctr code values are this design's own choice; only the three operations
// (add, subtract, or) and the 3-bit width come from the control table.
package cpu_pkg;

  localparam int unsigned XLEN = 32;  // data path and instruction width
  localparam int unsigned RLEN = 5;   // register specifier width (32 registers)

  typedef logic [XLEN-1:0] word_t;
  typedef logic [RLEN-1:0] reg_idx_t;

  // Primary opcodes, instruction bits <31:26>
  typedef enum logic [5:0] {
    OP_RTYPE = 6'b00_0000,
    OP_ORI   = 6'b00_1101,
    OP_LW    = 6'b10_0011,
    OP_SW    = 6'b10_1011,
    OP_BEQ   = 6'b00_0100,
    OP_J     = 6'b00_0010
  } opcode_e;

  // R-type function codes, instruction bits <5:0>
  localparam logic [5:0] FUNCT_ADD = 6'b10_0000;
  localparam logic [5:0] FUNCT_SUB = 6'b10_0010;

  // ALU operation select, ALUctr<2:0>
  typedef enum logic [2:0] {
    ALU_ADD = 3'b010,
    ALU_SUB = 3'b110,
    ALU_OR  = 3'b001
  } alu_ctr_e;

  // Extender mode
  typedef enum logic {
    EXT_ZERO = 1'b0,
    EXT_SIGN = 1'b1
  } ext_op_e;

  // All control points of the datapath and the fetch unit
  typedef struct packed {
    logic     reg_dst;    // 0: write rt, 1: write rd
    logic     alu_src;    // 0: busB, 1: extended immediate
    logic     mem_to_reg; // 0: ALU result, 1: data memory output
    logic     reg_wr;     // write the register file
    logic     mem_wr;     // write the data memory
    logic     npc_sel;    // 0: "+4", 1: "Br" (branch if Zero)
    logic     jump;       // take the jump target
    ext_op_e  ext_op;     // zero or sign extension of imm16
    alu_ctr_e alu_ctr;    // ALU operation
  } ctrl_t;

  // Instruction field helpers
  function automatic logic [5:0] f_op(input word_t i);     return i[31:26]; endfunction
  function automatic reg_idx_t   f_rs(input word_t i);     return i[25:21]; endfunction
  function automatic reg_idx_t   f_rt(input word_t i);     return i[20:16]; endfunction
  function automatic reg_idx_t   f_rd(input word_t i);     return i[15:11]; endfunction
  function automatic logic [5:0] f_funct(input word_t i);  return i[5:0];   endfunction
  function automatic logic [15:0] f_imm16(input word_t i); return i[15:0];  endfunction
  function automatic logic [25:0] f_target(input word_t i); return i[25:0]; endfunction

endpackage
