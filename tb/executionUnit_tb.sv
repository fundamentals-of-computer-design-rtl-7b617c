// executionUnit_tb: drives the single-cycle execute unit with the operations
// of the reference program and random operands, and checks aluResult, zero
// and the branch target against values computed here.
module executionUnit_tb;
  logic [1:0]  ALU_Op;
  logic        ALU_Src;
  logic [31:0] adder_in, in1, in2, signExtend, aluResult, branchTarget;
  logic        zero;
  int checks = 0, failures = 0;

  executionUnit dut (.*);

  task automatic check(input string what, input logic [31:0] exp_res);
    #1;
    checks++;
    if (aluResult !== exp_res || zero !== (exp_res == 0) ||
        branchTarget !== adder_in + (signExtend << 2)) begin
      failures++;
      $display("FAIL %s res=%h exp=%h zero=%0b bt=%h", what, aluResult, exp_res, zero, branchTarget);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // beq $t1,$t2: 0x112 - 0xA = 0x108, not zero
    ALU_Op = 2'b01; ALU_Src = 0; in1 = 32'h112; in2 = 32'hA; adder_in = 32'h10; signExtend = 32'd3;
    check("beq ne", 32'h108);
    in2 = 32'h112;
    check("beq eq", 32'h0);
    if (branchTarget !== 32'h1C) begin failures++; $display("FAIL target %h", branchTarget); end
    checks++;
    // add / or (funct from signExtend[5:0])
    ALU_Op = 2'b10; in1 = 32'h112; in2 = 32'hA; signExtend = 32'h4820;
    check("add", 32'h11C);
    in1 = 32'h11C; signExtend = 32'h4825;
    check("or", 32'h11E);
    // addi / sw address
    ALU_Op = 2'b00; ALU_Src = 1; in1 = 32'hA; signExtend = 32'd100;
    check("sw addr", 32'h6E);
    for (int i = 0; i < 300; i++) begin
      logic [31:0] r, b;
      in1 = $urandom; in2 = $urandom; adder_in = $urandom & ~32'h3;
      signExtend = {{16{1'($urandom)}}, 16'($urandom)};
      ALU_Src = 1'($urandom);
      b = ALU_Src ? signExtend : in2;
      case ($urandom_range(0, 6))
        0: begin ALU_Op = 2'b00; r = in1 + b; end
        1: begin ALU_Op = 2'b01; r = in1 - b; end
        2: begin ALU_Op = 2'b10; signExtend[5:0] = 6'h20; b = ALU_Src ? signExtend : in2; r = in1 + b; end
        3: begin ALU_Op = 2'b10; signExtend[5:0] = 6'h22; b = ALU_Src ? signExtend : in2; r = in1 - b; end
        4: begin ALU_Op = 2'b10; signExtend[5:0] = 6'h24; b = ALU_Src ? signExtend : in2; r = in1 & b; end
        5: begin ALU_Op = 2'b10; signExtend[5:0] = 6'h25; b = ALU_Src ? signExtend : in2; r = in1 | b; end
        default: begin ALU_Op = 2'b10; signExtend[5:0] = 6'h2A; b = ALU_Src ? signExtend : in2;
                       r = ($signed(in1) < $signed(b)) ? 32'd1 : 32'd0; end
      endcase
      check("random", r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
