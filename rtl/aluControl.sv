// aluControl: turns the decoder's 2-bit ALUOp and the funct field into the
// 3-bit ALU operation. ALUOp add/subtract pass straight through; ALUOp funct
// decodes add, sub, and, or, slt, and any other funct (e.g. the all-zero
// no-op word) falls back to add. Combinational. Standard MIPS table.
module aluControl
  import mips_pkg::*;
(
  input  logic [1:0] ALUOp,
  input  logic [5:0] funct,
  output alu_op_e    alu_op
);
  always_comb begin
    unique case (ALUOp)
      ALUOP_ADD: alu_op = ALU_ADD;
      ALUOP_SUB: alu_op = ALU_SUB;
      default: begin
        unique case (funct)
          FN_ADD:  alu_op = ALU_ADD;
          FN_SUB:  alu_op = ALU_SUB;
          FN_AND:  alu_op = ALU_AND;
          FN_OR:   alu_op = ALU_OR;
          FN_SLT:  alu_op = ALU_SLT;
          default: alu_op = ALU_ADD;
        endcase
      end
    endcase
  end
endmodule
