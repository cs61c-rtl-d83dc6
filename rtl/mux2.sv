// mux2: two-input multiplexer, out = sel ? in1 : in0.
//
// The processor uses three of them, with the inputs numbered as drawn in the datapath:
// RegDst (0: rt, 1: rd), ALUSrc (0: busB, 1: extended immediate) and MemtoReg
// (0: ALU result, 1: data memory). Purely combinational; the width is a parameter.
module mux2 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] in0,
  input  logic [WIDTH-1:0] in1,
  input  logic             sel,
  output logic [WIDTH-1:0] out
);
  always_comb out = sel ? in1 : in0;
endmodule
