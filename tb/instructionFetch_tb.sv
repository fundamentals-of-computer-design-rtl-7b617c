// instructionFetch_tb: loads the reference single-cycle program, steps the
// PC through PC+4 and a loaded branch address, and checks the PC+4 output and the
// fetched words against the program's encodings.
module instructionFetch_tb;
  logic        clk = 0, rst;
  logic [31:0] load_address_in, adder_out, instruction_out;
  logic [31:0] prog [8] = '{32'h20090112, 32'h200A000A, 32'h200B000F, 32'h112A0003,
                            32'h012A4820, 32'hAD4B0064, 32'h012A4825, 32'h00000000};
  int checks = 0, failures = 0;

  instructionFetch #(.IMEM_WORDS(256), .INIT_FILE("rtl/prog_single_cycle.hex")) dut (
    .clk_in(clk), .rst(rst), .load_address_in(load_address_in),
    .adder_out(adder_out), .instruction_out(instruction_out));

  always #5 clk = ~clk;
  logic        jump = 0;
  always_comb load_address_in = jump ? 32'h0000001C : adder_out;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (instruction_out !== prog[i] || adder_out !== 32'(4 * i + 4)) begin
        failures++;
        $display("FAIL word %0d: %h exp %h, pc+4=%h", i, instruction_out, prog[i], adder_out);
      end
      @(posedge clk); #1;
    end
    // a loaded address other than PC+4 (as for a taken branch) is followed
    rst = 1; @(posedge clk); #1 rst = 0; jump = 1;
    @(posedge clk); #1 jump = 0;
    checks++;
    if (instruction_out !== prog[7] || adder_out !== 32'h20) begin
      failures++; $display("FAIL jump: %h pc+4=%h", instruction_out, adder_out);
    end
    @(posedge clk); #1;
    checks++;
    if (adder_out !== 32'h24) begin failures++; $display("FAIL after jump pc+4=%h", adder_out); end
    // reset returns to word 0
    rst = 1; @(posedge clk); #1 rst = 0;
    checks++;
    if (instruction_out !== prog[0]) begin failures++; $display("FAIL after reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
