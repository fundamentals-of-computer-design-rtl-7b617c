// mips_pipeline_tb: runs two programs on the five-stage pipeline and checks
// the observation ports cycle by cycle (cycle 1 = first cycle after reset,
// when word 0 is fetched; instruction k is in F in cycle k+1, D k+2, E k+3,
// M k+4, W k+5).
//  A. The reference program with three no-ops after the load phase. Checks
//     the fetched word, the EX-stage ALU result, the W-stage destination and
//     data, the store appearing on dataMemOut, and that "or $t1,$t1,$t2"
//     reads the old $t1 = 0x112 (its producer, add, is only two ahead and
//     there is no forwarding), giving 0x11A.
//  B. A taken beq (resolved in M): the three instructions behind it still
//     write back, the next two are skipped, the target writes back.
module mips_pipeline_tb;
  logic clk = 0, rst;
  int checks = 0, failures = 0;
  int cyc = 0;

  logic [31:0] a_alu, a_rd1, a_rd2, a_dmem, a_if, a_wbd;  logic a_zero;  logic [4:0] a_wr;
  logic [31:0] b_alu, b_rd1, b_rd2, b_dmem, b_if, b_wbd;  logic b_zero;  logic [4:0] b_wr;

  mips_pipeline dut_a (.clk(clk), .rst(rst), .aluResult(a_alu), .zero(a_zero),
    .readData1(a_rd1), .readData2(a_rd2), .dataMemOut(a_dmem), .instructionIF_out(a_if),
    .writeRegister_out(a_wr), .writebackData_out(a_wbd));
  mips_pipeline #(.PROGRAM("tb/prog_pipe_branch.hex")) dut_b (.clk(clk), .rst(rst),
    .aluResult(b_alu), .zero(b_zero), .readData1(b_rd1), .readData2(b_rd2), .dataMemOut(b_dmem),
    .instructionIF_out(b_if), .writeRegister_out(b_wr), .writebackData_out(b_wbd));

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

  logic [31:0] prog_a [11] = '{32'h20090112, 32'h200A000A, 32'h200B000F, 0, 0, 0,
                               32'h112A0003, 32'h012A4820, 32'hAD4B0064, 32'h012A4825, 0};
  // W stage of program A, cycles 5..15: {destination, data}
  logic [36:0] wb_a [11] = '{{5'd9, 32'h112}, {5'd10, 32'hA}, {5'd11, 32'hF}, 0, 0, 0,
                             {5'd10, 32'h108}, {5'd9, 32'h11C}, {5'd11, 32'h6E}, {5'd9, 32'h11A}, 0};
  // W stage of program B, cycles 5..15
  logic [36:0] wb_b [11] = '{{5'd9, 32'h1}, {5'd10, 32'h1}, 0, 0, 0, {5'd10, 32'h0},
                             {5'd11, 32'h11}, {5'd12, 32'h22}, {5'd13, 32'h33}, {5'd16, 32'h66}, 0};

  initial begin
    rst = 1;
    @(posedge clk); #1 rst = 0;
    for (cyc = 1; cyc <= 15; cyc++) begin
      @(negedge clk);
      // program A
      if (cyc <= 11) expect32("A IF word", a_if, prog_a[cyc-1]);
      if (cyc >= 5) expect32("A W dest/data", 32'({a_wr, a_wbd} == wb_a[cyc-5]), 1);
      case (cyc)
        3:  expect32("A EX addi $t1", a_alu, 32'h112);
        4:  expect32("A EX addi $t2", a_alu, 32'hA);
        5:  expect32("A EX addi $t3", a_alu, 32'hF);
        9:  begin expect32("A EX beq", a_alu, 32'h108); expect32("A beq zero", 32'(a_zero), 0); end
        10: begin expect32("A EX add", a_alu, 32'h11C);
                  expect32("A D sw base", a_rd1, 32'hA); expect32("A D sw data", a_rd2, 32'hF); end
        11: begin expect32("A EX sw address", a_alu, 32'h6E);
                  expect32("A D or reads old $t1", a_rd1, 32'h112); end
        12: expect32("A EX or", a_alu, 32'h11A);
        13: expect32("A dataMemOut after sw", a_dmem, 32'hF);
        default: ;
      endcase
      // program B
      if (cyc >= 5) expect32("B W dest/data", 32'({b_wr, b_wbd} == wb_b[cyc-5]), 1);
      if (cyc == 8) begin expect32("B EX beq", b_alu, 32'h0); expect32("B beq zero", 32'(b_zero), 1); end
      if (cyc == 10) expect32("B IF branch target", b_if, 32'h20100066);
      if (cyc == 9)  expect32("B IF third instr after beq", b_if, 32'h200D0033);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
