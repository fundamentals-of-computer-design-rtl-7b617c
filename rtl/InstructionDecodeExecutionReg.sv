// InstructionDecodeExecutionReg: ID/EX pipeline register.
//
// Carries the seven control signals of the decoded instruction together with
// PC+4, the instruction itself, its sign-extended immediate and the two
// register values into the execute stage, one rising clock edge later.
// Port names follow the schematic (suffix _in / _out). A synchronous,
// active-high rst clears everything, which is a bubble with no register or
// memory write (this design's choice).
module InstructionDecodeExecutionReg (
  input  logic        clk,
  input  logic        rst,
  input  logic [1:0]  ALUOp_in,
  input  logic        ALUSrc_in,
  input  logic        Branch_in,
  input  logic        MemWrite_in,
  input  logic        MemtoReg_in,
  input  logic        RegDst_in,
  input  logic        RegWrite_in,
  input  logic [31:0] adder_in,
  input  logic [31:0] instruction_in,
  input  logic [31:0] instructionsignextend_in,
  input  logic [31:0] readData1_in,
  input  logic [31:0] readData2_in,
  output logic [1:0]  ALUOp_out,
  output logic        ALUSrc_out,
  output logic        Branch_out,
  output logic        MemWrite_out,
  output logic        MemtoReg_out,
  output logic        RegDst_out,
  output logic        RegWrite_out,
  output logic [31:0] adder_out,
  output logic [31:0] instruction_out,
  output logic [31:0] instructionsignextend_out,
  output logic [31:0] readData1_out,
  output logic [31:0] readData2_out
);
  always_ff @(posedge clk) begin
    if (rst) begin
      ALUOp_out                 <= '0;
      ALUSrc_out                <= 1'b0;
      Branch_out                <= 1'b0;
      MemWrite_out              <= 1'b0;
      MemtoReg_out              <= 1'b0;
      RegDst_out                <= 1'b0;
      RegWrite_out              <= 1'b0;
      adder_out                 <= '0;
      instruction_out           <= '0;
      instructionsignextend_out <= '0;
      readData1_out             <= '0;
      readData2_out             <= '0;
    end else begin
      ALUOp_out                 <= ALUOp_in;
      ALUSrc_out                <= ALUSrc_in;
      Branch_out                <= Branch_in;
      MemWrite_out              <= MemWrite_in;
      MemtoReg_out              <= MemtoReg_in;
      RegDst_out                <= RegDst_in;
      RegWrite_out              <= RegWrite_in;
      adder_out                 <= adder_in;
      instruction_out           <= instruction_in;
      instructionsignextend_out <= instructionsignextend_in;
      readData1_out             <= readData1_in;
      readData2_out             <= readData2_in;
    end
  end
endmodule
