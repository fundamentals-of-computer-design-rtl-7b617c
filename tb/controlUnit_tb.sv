// controlUnit_tb: checks the main decoder's outputs for every opcode against
// a reference table written out below; unknown opcodes must give a no-op.
module controlUnit_tb;
  logic [5:0] opcode;
  logic [1:0] ALUOp;
  logic       AluSrc, Branch, MemWrite, MemtoReg, RegDst, RegWrite;
  int checks = 0, failures = 0;

  controlUnit dut (.*);

  // expected {ALUOp, AluSrc, Branch, MemWrite, MemtoReg, RegDst, RegWrite}
  function automatic logic [7:0] expected(input logic [5:0] op);
    case (op)
      6'b000000: return 8'b10_0_0_0_0_1_1;  // R-type
      6'b001000: return 8'b00_1_0_0_0_0_1;  // addi
      6'b100011: return 8'b00_1_0_0_1_0_1;  // lw
      6'b101011: return 8'b00_1_0_1_0_0_0;  // sw
      6'b000100: return 8'b01_0_1_0_0_0_0;  // beq
      default:   return 8'b00_0_0_0_0_0_0;
    endcase
  endfunction

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      opcode = 6'(i);
      #1;
      checks++;
      if ({ALUOp, AluSrc, Branch, MemWrite, MemtoReg, RegDst, RegWrite} !== expected(opcode)) begin
        failures++;
        $display("FAIL opcode=%b got=%b exp=%b", opcode,
                 {ALUOp, AluSrc, Branch, MemWrite, MemtoReg, RegDst, RegWrite}, expected(opcode));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
