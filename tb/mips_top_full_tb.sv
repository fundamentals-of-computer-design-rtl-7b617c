// mips_top_full_tb: the top level with all parameters at their defaults,
// taken through the complete reference programs on both cores: the
// single-cycle ALU results and the store, and the pipeline's write-back
// sequence, ending with $t1 = 0x11E (single-cycle) and 0x11A (pipeline).
module mips_top_full_tb;
  logic clk = 0, rst;
  int checks = 0, failures = 0;
  int cyc = 0;

  logic [31:0] sc_alu, sc_rd1, sc_rd2, sc_dmem, pl_alu, pl_rd1, pl_rd2, pl_dmem, pl_if, pl_wbd;
  logic        sc_zero, pl_zero;
  logic [4:0]  pl_wr;

  mips_top dut (.clk(clk), .rst(rst),
    .sc_aluResult(sc_alu), .sc_zero(sc_zero), .sc_readData1(sc_rd1), .sc_readData2(sc_rd2),
    .sc_dataMemOut(sc_dmem), .pl_aluResult(pl_alu), .pl_zero(pl_zero), .pl_readData1(pl_rd1),
    .pl_readData2(pl_rd2), .pl_dataMemOut(pl_dmem), .pl_instructionIF_out(pl_if),
    .pl_writeRegister_out(pl_wr), .pl_writebackData_out(pl_wbd));

  always #10 clk = ~clk;

  task automatic expect32(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL cycle %0d %s: got %h expected %h", cyc, what, got, exp);
    end
  endtask

  initial begin
    repeat (300) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] sc_exp [7] = '{32'h112, 32'hA, 32'hF, 32'h108, 32'h11C, 32'h6E, 32'h11E};
  logic [36:0] wb_exp [10] = '{{5'd9, 32'h112}, {5'd10, 32'hA}, {5'd11, 32'hF}, 0, 0, 0,
                               {5'd10, 32'h108}, {5'd9, 32'h11C}, {5'd11, 32'h6E}, {5'd9, 32'h11A}};

  initial begin
    rst = 1;
    @(posedge clk); #1 rst = 0;
    for (cyc = 1; cyc <= 14; cyc++) begin
      @(negedge clk);
      if (cyc <= 7) expect32("single-cycle aluResult", sc_alu, sc_exp[cyc-1]);
      if (cyc == 7) expect32("single-cycle dataMemOut", sc_dmem, 32'hF);
      if (cyc >= 5) expect32("pipeline write-back", 32'({pl_wr, pl_wbd} == wb_exp[cyc-5]), 1);
      if (cyc == 13) expect32("pipeline dataMemOut", pl_dmem, 32'hF);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
