// datapath: the execution part of the single-cycle processor.
//
// Register file (Ra = rs, Rb = rt, Rw = RegDst ? rd : rt), extender (ExtOp), ALUSrc mux
// (busB or extended immediate), ALU (ALUctr), data memory (Adr = ALU result,
// Data In = busB, WrEn = MemWr) and MemtoReg mux (ALU result or memory output) driving
// busW. Everything between the register file's read and its write is combinational, so
// one instruction completes per clock; the register file and data memory are written at
// the same rising edge. Zero goes back to the control / fetch unit for beq.
// The structure and the input numbering of every mux follow the reference datapath;
// memory depth is a parameter of this design.
module datapath
  import cpu_pkg::*;
#(
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic        clk,
  input  reg_idx_t    rs,
  input  reg_idx_t    rt,
  input  reg_idx_t    rd,
  input  logic [15:0] imm16,
  input  ctrl_t       ctrl,
  output logic        zero,
  // observation of the buses, for debug and test
  output word_t       alu_out,
  output word_t       bus_w
);
  reg_idx_t rw;
  word_t    bus_a, bus_b, imm32, alu_b, mem_out;

  mux2 #(.WIDTH(RLEN)) u_regdst_mux (
    .in0(rt), .in1(rd), .sel(ctrl.reg_dst), .out(rw)
  );

  register_file u_rf (
    .clk   (clk),
    .reg_wr(ctrl.reg_wr),
    .rw    (rw),
    .bus_w (bus_w),
    .ra    (rs),
    .rb    (rt),
    .bus_a (bus_a),
    .bus_b (bus_b)
  );

  extender u_ext (
    .imm16 (imm16),
    .ext_op(ctrl.ext_op),
    .imm32 (imm32)
  );

  mux2 #(.WIDTH(XLEN)) u_alusrc_mux (
    .in0(bus_b), .in1(imm32), .sel(ctrl.alu_src), .out(alu_b)
  );

  alu u_alu (
    .a      (bus_a),
    .b      (alu_b),
    .alu_ctr(ctrl.alu_ctr),
    .result (alu_out),
    .zero   (zero)
  );

  data_memory #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk     (clk),
    .wr_en   (ctrl.mem_wr),
    .adr     (alu_out),
    .data_in (bus_b),
    .data_out(mem_out)
  );

  mux2 #(.WIDTH(XLEN)) u_memtoreg_mux (
    .in0(alu_out), .in1(mem_out), .sel(ctrl.mem_to_reg), .out(bus_w)
  );
endmodule
