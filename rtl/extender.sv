// extender: widens the 16-bit immediate to 32 bits.
//
// ExtOp selects "zero" (upper 16 bits cleared, used by ori) or "sign" (upper 16 bits
// copies of imm16<15>, used by lw and sw). Purely combinational.
module extender
  import cpu_pkg::*;
(
  input  logic [15:0] imm16,
  input  ext_op_e     ext_op,
  output word_t       imm32
);
  always_comb begin
    if (ext_op == EXT_SIGN) imm32 = {{16{imm16[15]}}, imm16};
    else                    imm32 = {16'h0000, imm16};
  end
endmodule
