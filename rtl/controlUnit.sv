// controlUnit: main decoder of the MIPS cores.
//
// Maps the 6-bit opcode to the seven datapath controls. Combinational.
//   R-type : RegDst RegWrite,            ALUOp = funct
//   addi   : AluSrc RegWrite,            ALUOp = add
//   lw     : AluSrc MemtoReg RegWrite,   ALUOp = add
//   sw     : AluSrc MemWrite,            ALUOp = add
//   beq    : Branch,                     ALUOp = subtract
// Any other opcode yields all-zero controls, i.e. a no-op. The output names
// follow the schematic; the table is the standard MIPS one.
module controlUnit
  import mips_pkg::*;
(
  input  logic [5:0] opcode,
  output logic [1:0] ALUOp,
  output logic       AluSrc,
  output logic       Branch,
  output logic       MemWrite,
  output logic       MemtoReg,
  output logic       RegDst,
  output logic       RegWrite
);
  always_comb begin
    ALUOp    = ALUOP_ADD;
    AluSrc   = 1'b0;
    Branch   = 1'b0;
    MemWrite = 1'b0;
    MemtoReg = 1'b0;
    RegDst   = 1'b0;
    RegWrite = 1'b0;
    unique case (opcode)
      OP_RTYPE: begin RegDst = 1'b1; RegWrite = 1'b1; ALUOp = ALUOP_FUNCT; end
      OP_ADDI:  begin AluSrc = 1'b1; RegWrite = 1'b1; end
      OP_LW:    begin AluSrc = 1'b1; MemtoReg = 1'b1; RegWrite = 1'b1; end
      OP_SW:    begin AluSrc = 1'b1; MemWrite = 1'b1; end
      OP_BEQ:   begin Branch = 1'b1; ALUOp = ALUOP_SUB; end
      default:  ;
    endcase
  end
endmodule
