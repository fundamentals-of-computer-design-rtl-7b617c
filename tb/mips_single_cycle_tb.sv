// mips_single_cycle_tb: runs three programs on the single-cycle core.
//  1. The reference program (beq not taken): checks aluResult, zero and
//     dataMemOut cycle by cycle - 0x112, 0xA, 0xF for the three addi, 0x108
//     for beq, 0x11C for add, 0x6E for the sw address, 0x11E for or, and the
//     stored 0xF on dataMemOut one cycle after the sw - and the register values read
//     by the dependent instructions.
//  2. The beq-taken variant ($t2 = 0x112): beq yields zero and the PC jumps
//     to word 7 (a no-op), so add, sw and or never execute.
//  3. A load/ALU program on a core with an asynchronous data memory read:
//     sw, lw, add, sub, and, slt.
// One instruction per clock is checked by sampling every cycle.
module mips_single_cycle_tb;
  logic clk = 0, rst;
  int checks = 0, failures = 0;

  logic [31:0] a_alu, a_rd1, a_rd2, a_dmem;  logic a_zero;
  logic [31:0] b_alu, b_rd1, b_rd2, b_dmem;  logic b_zero;
  logic [31:0] c_alu, c_rd1, c_rd2, c_dmem;  logic c_zero;

  mips_single_cycle dut_a (.clk(clk), .rst(rst), .aluResult(a_alu), .zero(a_zero),
    .readData1(a_rd1), .readData2(a_rd2), .dataMemOut(a_dmem));
  mips_single_cycle #(.PROGRAM("rtl/prog_single_cycle_beq_taken.hex")) dut_b (
    .clk(clk), .rst(rst), .aluResult(b_alu), .zero(b_zero),
    .readData1(b_rd1), .readData2(b_rd2), .dataMemOut(b_dmem));
  mips_single_cycle #(.PROGRAM("tb/prog_lw_alu.hex"), .DMEM_READ_REG(1'b0)) dut_c (
    .clk(clk), .rst(rst), .aluResult(c_alu), .zero(c_zero),
    .readData1(c_rd1), .readData2(c_rd2), .dataMemOut(c_dmem));

  always #10 clk = ~clk;   // 20 ns period

  task automatic expect32(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected aluResult per cycle of the reference program
  logic [31:0] exp_a [7] = '{32'h112, 32'hA, 32'hF, 32'h108, 32'h11C, 32'h6E, 32'h11E};
  // beq-taken program: addi x3, beq (0), then the no-op at word 7
  logic [31:0] exp_b [5] = '{32'h112, 32'h112, 32'hF, 32'h0, 32'h0};
  logic [31:0] exp_c [7] = '{32'h55, 32'h4, 32'h4, 32'hAA, 32'h55, 32'h0, 32'h1};

  initial begin
    rst = 1;
    @(posedge clk); #1 rst = 0;
    for (int c = 0; c < 7; c++) begin
      @(negedge clk);
      expect32($sformatf("A cycle %0d aluResult", c), a_alu, exp_a[c]);
      expect32($sformatf("A cycle %0d zero", c), 32'(a_zero), 32'(exp_a[c] == 0));
      if (c < 5) expect32($sformatf("B cycle %0d aluResult", c), b_alu, exp_b[c]);
      if (c == 3) expect32("B beq zero", 32'(b_zero), 32'd1);
      expect32($sformatf("C cycle %0d aluResult", c), c_alu, exp_c[c]);
      if (c == 2) expect32("C lw data", c_dmem, 32'h55);
      if (c == 6) expect32("A dataMemOut after sw", a_dmem, 32'hF);
      // register reads of the instructions that depend on earlier writes
      if (c == 4) begin expect32("A add rs", a_rd1, 32'h112); expect32("A add rt", a_rd2, 32'hA); end
      if (c == 5) begin expect32("A sw base", a_rd1, 32'hA);  expect32("A sw data", a_rd2, 32'hF); end
      if (c == 6) expect32("A or rs", a_rd1, 32'h11C);
      if (c == 3) begin expect32("B beq rs", b_rd1, 32'h112); expect32("B beq rt", b_rd2, 32'h112); end
      if (c == 4) begin expect32("B no-op at word 7", b_rd1, 32'h0); expect32("B dmem", b_dmem, 32'h0); end
      if (c == 3) begin expect32("C add rs (loaded)", c_rd1, 32'h55); expect32("C add rt", c_rd2, 32'h55); end    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
