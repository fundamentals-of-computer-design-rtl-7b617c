// mips_pkg: encodings shared by the single-cycle and pipelined MIPS cores.
//
// Holds the opcode and funct values of the supported instructions (R-type
// add/sub/and/or/slt, addi, lw, sw, beq), the 2-bit ALUOp code that the main
// decoder hands to the ALU control, and the 3-bit ALU operation code. The
// values are the standard MIPS-I encodings; the 3-bit ALU codes follow the
// classic textbook table and are this design's choice.
package mips_pkg;

  // Primary opcodes (instruction[31:26])
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_ADDI  = 6'h08;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2B;

  // R-type function codes (instruction[5:0])
  localparam logic [5:0] FN_ADD = 6'h20;
  localparam logic [5:0] FN_SUB = 6'h22;
  localparam logic [5:0] FN_AND = 6'h24;
  localparam logic [5:0] FN_OR  = 6'h25;
  localparam logic [5:0] FN_SLT = 6'h2A;

  // Main decoder -> ALU control
  typedef enum logic [1:0] {
    ALUOP_ADD   = 2'b00,   // address / immediate add
    ALUOP_SUB   = 2'b01,   // beq compare
    ALUOP_FUNCT = 2'b10    // R-type: operation from funct
  } aluop_e;

  // ALU control -> ALU
  typedef enum logic [2:0] {
    ALU_AND = 3'b000,
    ALU_OR  = 3'b001,
    ALU_ADD = 3'b010,
    ALU_SUB = 3'b110,
    ALU_SLT = 3'b111
  } alu_op_e;

endpackage
