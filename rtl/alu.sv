// Combinational ALU of the single-bus processor.
//
// One operand is always the Y register, the other is the bus; the result goes
// to the Z register, which latches it only when Zin is active. The eight
// operations are those of the control-signal table: add, and, xor, or, shift
// left (bus << Y), set-less-than (Y < bus), shift right logical (bus >> Y)
// and subtract (Y - bus). This design's own choices: the comparison is signed
// (as MIPS slt), the shift amount is Y[4:0], and the result of slt is 1 or 0.
//
// Interface: op selects the operation (mips_pkg::alu_op_t), y and b are the
// operands, result is valid in the same cycle (no registers).
module alu
  import mips_pkg::*;
(
  input  alu_op_t op,
  input  word_t   y,
  input  word_t   b,
  output word_t   result
);
  always_comb begin
    unique case (op)
      ALU_ADD: result = y + b;
      ALU_AND: result = y & b;
      ALU_XOR: result = y ^ b;
      ALU_OR:  result = y | b;
      ALU_SL:  result = b << y[4:0];
      ALU_SLT: result = {31'd0, $signed(y) < $signed(b)};
      ALU_SRL: result = b >> y[4:0];
      ALU_SUB: result = y - b;
      default: result = '0;
    endcase
  end
endmodule
