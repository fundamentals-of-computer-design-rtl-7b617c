// ExecutionMemoryReg_tb: drives random values into the pipeline register and checks
// that each output equals its input one rising clock edge later, holds
// between edges, and that reset clears every field.
module ExecutionMemoryReg_tb;
  logic clk = 0, rst;
  logic [31:0] ALUResult_in, ALUResult_out;
  logic [0:0] Branch_in, Branch_out;
  logic [0:0] MemWrite_in, MemWrite_out;
  logic [0:0] MemtoReg_in, MemtoReg_out;
  logic [4:0] RegDstMux_in, RegDstMux_out;
  logic [0:0] RegWrite_in, RegWrite_out;
  logic [31:0] adderbranch_in, adderbranch_out;
  logic [31:0] readData2_in, readData2_out;
  logic [0:0] zero_in, zero_out;
  logic [105:0] sent;
  int checks = 0, failures = 0;

  ExecutionMemoryReg dut (
    .clk(clk), .rst(rst),
    .ALUResult_in(ALUResult_in), .ALUResult_out(ALUResult_out),
    .Branch_in(Branch_in), .Branch_out(Branch_out),
    .MemWrite_in(MemWrite_in), .MemWrite_out(MemWrite_out),
    .MemtoReg_in(MemtoReg_in), .MemtoReg_out(MemtoReg_out),
    .RegDstMux_in(RegDstMux_in), .RegDstMux_out(RegDstMux_out),
    .RegWrite_in(RegWrite_in), .RegWrite_out(RegWrite_out),
    .adderbranch_in(adderbranch_in), .adderbranch_out(adderbranch_out),
    .readData2_in(readData2_in), .readData2_out(readData2_out),
    .zero_in(zero_in), .zero_out(zero_out)
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
    {ALUResult_in, Branch_in, MemWrite_in, MemtoReg_in, RegDstMux_in, RegWrite_in, adderbranch_in, readData2_in, zero_in} = 106'({ $urandom, $urandom, $urandom, $urandom });
    for (int i = 0; i < 500; i++) begin
      @(posedge clk); #1;
      sent = {ALUResult_in, Branch_in, MemWrite_in, MemtoReg_in, RegDstMux_in, RegWrite_in, adderbranch_in, readData2_in, zero_in};
      {ALUResult_in, Branch_in, MemWrite_in, MemtoReg_in, RegDstMux_in, RegWrite_in, adderbranch_in, readData2_in, zero_in} = 106'({ $urandom, $urandom, $urandom, $urandom });
      rst = (i % 97 == 50);
      #1;
      checks++;
      if ({ALUResult_out, Branch_out, MemWrite_out, MemtoReg_out, RegDstMux_out, RegWrite_out, adderbranch_out, readData2_out, zero_out} !== sent) begin
        failures++;
        $display("FAIL cycle %0d: out=%h exp=%h", i, {ALUResult_out, Branch_out, MemWrite_out, MemtoReg_out, RegDstMux_out, RegWrite_out, adderbranch_out, readData2_out, zero_out}, sent);
      end
      if (rst) begin
        @(posedge clk); #1;
        rst = 0;
        checks++;
        if ({ALUResult_out, Branch_out, MemWrite_out, MemtoReg_out, RegDstMux_out, RegWrite_out, adderbranch_out, readData2_out, zero_out} !== '0) begin
          failures++;
          $display("FAIL reset: out=%h", {ALUResult_out, Branch_out, MemWrite_out, MemtoReg_out, RegDstMux_out, RegWrite_out, adderbranch_out, readData2_out, zero_out});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
