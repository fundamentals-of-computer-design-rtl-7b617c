// executionUnit: execute stage of the single-cycle core.
//
// Selects the ALU's second operand (in2, or the sign-extended immediate when
// ALU_Src), decodes the ALU operation from ALU_Op and the funct field, and
// computes aluResult and zero. It also forms the beq target,
// branchTarget = adder_in (PC+4) + signExtend * 4. Combinational.
// The single-cycle schematic gives this unit no instruction input, so the
// funct field is read from signExtend[5:0], which equals instruction[5:0].
module executionUnit
  import mips_pkg::*;
(
  input  logic [1:0]  ALU_Op,
  input  logic        ALU_Src,
  input  logic [31:0] adder_in,
  input  logic [31:0] in1,
  input  logic [31:0] in2,
  input  logic [31:0] signExtend,
  output logic [31:0] aluResult,
  output logic [31:0] branchTarget,
  output logic        zero
);
  alu_op_e     op;
  logic [31:0] b;

  always_comb begin
    b            = ALU_Src ? signExtend : in2;
    branchTarget = adder_in + {signExtend[29:0], 2'b00};
  end

  aluControl u_ctl (.ALUOp(ALU_Op), .funct(signExtend[5:0]), .alu_op(op));
  alu        u_alu (.a(in1), .b(b), .op(op), .result(aluResult), .zero(zero));
endmodule
