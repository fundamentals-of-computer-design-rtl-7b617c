// instructionDecodePipe_tb: random writes (destination given by writeReg)
// and reads through the pipelined decode unit, checked against a register
// model kept here. Also checks that a read in the same cycle as the write
// returns the old value (no write-through).
module instructionDecodePipe_tb;
  logic        clk = 0, rst, regWrite;
  logic [4:0]  writeReg;
  logic [31:0] instruction, writeData, readData1, readData2, signExtend_out;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  instructionDecodePipe dut (.clk_in(clk), .*);

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
      $display("FAIL instr=%h rd1=%h/%h rd2=%h/%h", instruction, readData1, model[instruction[25:21]],
               readData2, model[instruction[20:16]]);
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    rst = 1; regWrite = 0; writeReg = '0; instruction = '0; writeData = '0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 1000; i++) begin
      instruction = $urandom; regWrite = 1'($urandom); writeData = $urandom;
      writeReg = (i % 3 == 0) ? instruction[25:21] : 5'($urandom);
      #1;
      check_reads();
      @(posedge clk); #1;
      if (regWrite && writeReg != 0) model[writeReg] = writeData;
      check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
