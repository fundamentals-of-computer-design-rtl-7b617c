// InstructionDecodeExecutionReg_tb: drives random values into the pipeline register and checks
// that each output equals its input one rising clock edge later, holds
// between edges, and that reset clears every field.
module InstructionDecodeExecutionReg_tb;
  logic clk = 0, rst;
  logic [1:0] ALUOp_in, ALUOp_out;
  logic [0:0] ALUSrc_in, ALUSrc_out;
  logic [0:0] Branch_in, Branch_out;
  logic [0:0] MemWrite_in, MemWrite_out;
  logic [0:0] MemtoReg_in, MemtoReg_out;
  logic [0:0] RegDst_in, RegDst_out;
  logic [0:0] RegWrite_in, RegWrite_out;
  logic [31:0] adder_in, adder_out;
  logic [31:0] instruction_in, instruction_out;
  logic [31:0] instructionsignextend_in, instructionsignextend_out;
  logic [31:0] readData1_in, readData1_out;
  logic [31:0] readData2_in, readData2_out;
  logic [167:0] sent;
  int checks = 0, failures = 0;

  InstructionDecodeExecutionReg dut (
    .clk(clk), .rst(rst),
    .ALUOp_in(ALUOp_in), .ALUOp_out(ALUOp_out),
    .ALUSrc_in(ALUSrc_in), .ALUSrc_out(ALUSrc_out),
    .Branch_in(Branch_in), .Branch_out(Branch_out),
    .MemWrite_in(MemWrite_in), .MemWrite_out(MemWrite_out),
    .MemtoReg_in(MemtoReg_in), .MemtoReg_out(MemtoReg_out),
    .RegDst_in(RegDst_in), .RegDst_out(RegDst_out),
    .RegWrite_in(RegWrite_in), .RegWrite_out(RegWrite_out),
    .adder_in(adder_in), .adder_out(adder_out),
    .instruction_in(instruction_in), .instruction_out(instruction_out),
    .instructionsignextend_in(instructionsignextend_in), .instructionsignextend_out(instructionsignextend_out),
    .readData1_in(readData1_in), .readData1_out(readData1_out),
    .readData2_in(readData2_in), .readData2_out(readData2_out)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 0;
    {ALUOp_in, ALUSrc_in, Branch_in, MemWrite_in, MemtoReg_in, RegDst_in, RegWrite_in, adder_in, instruction_in, instructionsignextend_in, readData1_in, readData2_in} = 168'({ $urandom, $urandom, $urandom, $urandom, $urandom, $urandom });
    for (int i = 0; i < 500; i++) begin
      @(posedge clk); #1;
      sent = {ALUOp_in, ALUSrc_in, Branch_in, MemWrite_in, MemtoReg_in, RegDst_in, RegWrite_in, adder_in, instruction_in, instructionsignextend_in, readData1_in, readData2_in};
      {ALUOp_in, ALUSrc_in, Branch_in, MemWrite_in, MemtoReg_in, RegDst_in, RegWrite_in, adder_in, instruction_in, instructionsignextend_in, readData1_in, readData2_in} = 168'({ $urandom, $urandom, $urandom, $urandom, $urandom, $urandom });
      rst = (i % 97 == 50);
      #1;
      checks++;
      if ({ALUOp_out, ALUSrc_out, Branch_out, MemWrite_out, MemtoReg_out, RegDst_out, RegWrite_out, adder_out, instruction_out, instructionsignextend_out, readData1_out, readData2_out} !== sent) begin
        failures++;
        $display("FAIL cycle %0d: out=%h exp=%h", i, {ALUOp_out, ALUSrc_out, Branch_out, MemWrite_out, MemtoReg_out, RegDst_out, RegWrite_out, adder_out, instruction_out, instructionsignextend_out, readData1_out, readData2_out}, sent);
      end
      if (rst) begin
        @(posedge clk); #1;
        rst = 0;
        checks++;
        if ({ALUOp_out, ALUSrc_out, Branch_out, MemWrite_out, MemtoReg_out, RegDst_out, RegWrite_out, adder_out, instruction_out, instructionsignextend_out, readData1_out, readData2_out} !== '0) begin
          failures++;
          $display("FAIL reset: out=%h", {ALUOp_out, ALUSrc_out, Branch_out, MemWrite_out, MemtoReg_out, RegDst_out, RegWrite_out, adder_out, instruction_out, instructionsignextend_out, readData1_out, readData2_out});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
