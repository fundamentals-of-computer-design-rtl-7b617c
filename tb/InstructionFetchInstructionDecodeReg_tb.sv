// InstructionFetchInstructionDecodeReg_tb: drives random values into the pipeline register and checks
// that each output equals its input one rising clock edge later, holds
// between edges, and that reset clears every field.
module InstructionFetchInstructionDecodeReg_tb;
  logic clk = 0, rst;
  logic [31:0] adder_in, adder_out;
  logic [31:0] instruction_in, instruction_out;
  logic [63:0] sent;
  int checks = 0, failures = 0;

  InstructionFetchInstructionDecodeReg dut (
    .clk(clk), .rst(rst),
    .adder_in(adder_in), .adder_out(adder_out),
    .instruction_in(instruction_in), .instruction_out(instruction_out)
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
    {adder_in, instruction_in} = 64'({ $urandom, $urandom });
    for (int i = 0; i < 500; i++) begin
      @(posedge clk); #1;
      sent = {adder_in, instruction_in};
      {adder_in, instruction_in} = 64'({ $urandom, $urandom });
      rst = (i % 97 == 50);
      #1;
      checks++;
      if ({adder_out, instruction_out} !== sent) begin
        failures++;
        $display("FAIL cycle %0d: out=%h exp=%h", i, {adder_out, instruction_out}, sent);
      end
      if (rst) begin
        @(posedge clk); #1;
        rst = 0;
        checks++;
        if ({adder_out, instruction_out} !== '0) begin
          failures++;
          $display("FAIL reset: out=%h", {adder_out, instruction_out});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
