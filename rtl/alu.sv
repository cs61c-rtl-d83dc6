// alu: 32-bit arithmetic-logic unit of the single-cycle datapath.
//
// ALUctr selects add (add, lw, sw address), subtract (sub, beq compare) or bitwise OR (ori).
// Zero is 1 when the result is all zeros; beq uses it as the "equal" flag since
// busA - busB == 0 exactly when the two registers are equal. Purely combinational, no
// overflow detection. The ALUctr code values come from cpu_pkg and are this design's
// own encoding; an unused code gives a result of zero.
module alu
  import cpu_pkg::*;
(
  input  word_t    a,        // busA
  input  word_t    b,        // ALUSrc mux output
  input  alu_ctr_e alu_ctr,
  output word_t    result,
  output logic     zero
);
  always_comb begin
    unique case (alu_ctr)
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_OR:  result = a | b;
      default: result = '0;
    endcase
    zero = (result == '0);
  end
endmodule
