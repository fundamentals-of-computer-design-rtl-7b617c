// executionUnitPipe: EX stage of the pipelined core.
//
// Same ALU, operand mux and branch-target adder as executionUnit, plus the
// destination-register mux: RegDstMux_out is rd (instruction[15:11]) when
// RegDst is set and rt (instruction[20:16]) otherwise. The funct field comes
// from the EX-stage instruction. Combinational. The ports follow the
// pipeline schematic.
module executionUnitPipe
  import mips_pkg::*;
(
  input  logic [1:0]  ALU_Op,
  input  logic        ALU_Src,
  input  logic        RegDst,
  input  logic [31:0] adder_in,
  input  logic [31:0] instruction,
  input  logic [31:0] in1,
  input  logic [31:0] in2,
  input  logic [31:0] signExtend,
  output logic [4:0]  RegDstMux_out,
  output logic [31:0] aluResult,
  output logic [31:0] branchTarget,
  output logic        zero
);
  alu_op_e     op;
  logic [31:0] b;

  always_comb begin
    b             = ALU_Src ? signExtend : in2;
    branchTarget  = adder_in + {signExtend[29:0], 2'b00};
    RegDstMux_out = RegDst ? instruction[15:11] : instruction[20:16];
  end

  aluControl u_ctl (.ALUOp(ALU_Op), .funct(instruction[5:0]), .alu_op(op));
  alu        u_alu (.a(in1), .b(b), .op(op), .result(aluResult), .zero(zero));
endmodule
