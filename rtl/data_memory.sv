// data_memory: the "ideal" data memory of the single-cycle processor.
//
// Ports as drawn in the datapath: Adr (the ALU result), Data In (busB), WrEn (MemWr)
// and Clk; Data Out feeds the MemtoReg multiplexer. The word at Adr is read
// combinationally (lw reads it in the same cycle); a write of Data In happens at the
// rising clock edge when WrEn is 1 (sw). Adr is a byte address of an aligned word:
// Adr<1:0> is ignored and Adr is taken modulo the size. The depth (1024 words by
// default) and the rising edge are this design's own choices.
module data_memory
  import cpu_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic  clk,
  input  logic  wr_en,
  input  word_t adr,
  input  word_t data_in,
  output word_t data_out
);
  localparam int unsigned AW = $clog2(WORDS);

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[adr[AW+1:2]] <= data_in;
  end

  assign data_out = mem[adr[AW+1:2]];
endmodule
