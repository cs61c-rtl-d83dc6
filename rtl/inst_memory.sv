// inst_memory: the "ideal" instruction memory of the single-cycle processor.
//
// Instruction<31:0> = MEM[Adr] is read combinationally, so fetch takes no clock of its
// own and an instruction completes in one cycle. Adr is a byte address; words are
// aligned, so Adr<1:0> is ignored and Adr is taken modulo the memory size. Contents are
// written through a synchronous load port (prog_we/prog_addr/prog_data, word-addressed)
// before the program runs; that port and the default depth of 1024 words are this
// design's own choices, the processor only ever reads.
module inst_memory
  import cpu_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic                     clk,
  // program load port
  input  logic                     prog_we,
  input  logic [$clog2(WORDS)-1:0] prog_addr,
  input  word_t                    prog_data,
  // fetch port
  input  word_t                    adr,
  output word_t                    instruction
);
  localparam int unsigned AW = $clog2(WORDS);

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr] <= prog_data;
  end

  assign instruction = mem[adr[AW+1:2]];
endmodule
