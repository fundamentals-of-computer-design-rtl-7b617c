// alu: 32-bit MIPS ALU with and, or, add, sub and signed set-less-than.
// zero is set when the result is 0 (used by beq). Combinational; add and
// sub wrap without overflow detection.
module alu
  import mips_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_op_e     op,
  output logic [31:0] result,
  output logic        zero
);
  always_comb begin
    unique case (op)
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_SLT: result = {31'd0, $signed(a) < $signed(b)};
      default: result = a + b;
    endcase
    zero = (result == 32'd0);
  end
endmodule
