// register_file: 32 registers of 32 bits with two read ports and one write port.
//
// Ra and Rb select busA and busB combinationally. On the rising clock edge, when RegWr
// is 1, busW is written into register Rw, so a result computed in a cycle is visible
// to the next instruction. Register 0 always reads as zero and ignores writes, as MIPS
// defines $zero; the registers themselves are not reset. Hard-wiring register 0 and the
// rising edge are this design's own choices.
module register_file
  import cpu_pkg::*;
(
  input  logic     clk,
  input  logic     reg_wr,
  input  reg_idx_t rw,
  input  word_t    bus_w,
  input  reg_idx_t ra,
  input  reg_idx_t rb,
  output word_t    bus_a,
  output word_t    bus_b
);
  word_t regs [1 << RLEN];

  always_ff @(posedge clk) begin
    if (reg_wr && rw != '0) regs[rw] <= bus_w;
  end

  assign bus_a = (ra == '0) ? '0 : regs[ra];
  assign bus_b = (rb == '0) ? '0 : regs[rb];
endmodule
