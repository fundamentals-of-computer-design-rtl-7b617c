// instructionDecode_tb: random register writes and reads through the
// single-cycle decode unit, checked against a register model kept here.
// Covers the RegDst destination select, $zero staying 0, the write taking
// effect only after the clock edge, and sign extension.
module instructionDecode_tb;
  logic        clk = 0, rst, RegDst, regWrite;
  logic [31:0] instruction, writeData, readData1, readData2, signExtend_out;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  instructionDecode dut (.clk_in(clk), .*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    checks++;
    if (readData1 !== model[instruction[25:21]] || readData2 !== model[instruction[20:16]] ||
        signExtend_out !== {{16{instruction[15]}}, instruction[15:0]}) begin
      failures++;
      $display("FAIL instr=%h rd1=%h/%h rd2=%h/%h se=%h", instruction, readData1, model[instruction[25:21]],
               readData2, model[instruction[20:16]], signExtend_out);
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    rst = 1; regWrite = 0; RegDst = 0; instruction = '0; writeData = '0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 1000; i++) begin
      logic [4:0] dst;
      instruction = $urandom; RegDst = 1'($urandom); regWrite = 1'($urandom); writeData = $urandom;
      #1;
      check_reads();                       // old values before the edge
      dst = RegDst ? instruction[15:11] : instruction[20:16];
      @(posedge clk); #1;
      if (regWrite && dst != 0) model[dst] = writeData;
      check_reads();                       // new values after the edge
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
