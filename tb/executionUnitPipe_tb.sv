// executionUnitPipe_tb: random operations through the pipelined execute
// unit; checks aluResult, zero, branch target and the rd/rt destination
// select against values computed here.
module executionUnitPipe_tb;
  logic [1:0]  ALU_Op;
  logic        ALU_Src, RegDst;
  logic [31:0] adder_in, instruction, in1, in2, signExtend, aluResult, branchTarget;
  logic [4:0]  RegDstMux_out;
  logic        zero;
  int checks = 0, failures = 0;

  executionUnitPipe dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      logic [31:0] r, b;
      logic [5:0]  fn;
      in1 = (i % 5 == 0) ? 32'h112 : $urandom;
      in2 = (i % 5 == 0) ? 32'h112 : $urandom;
      adder_in = $urandom & ~32'h3;
      instruction = $urandom;
      signExtend = {{16{instruction[15]}}, instruction[15:0]};
      ALU_Src = 1'($urandom); RegDst = 1'($urandom);
      b = ALU_Src ? signExtend : in2;
      ALU_Op = 2'($urandom_range(0, 2));
      case ($urandom_range(0, 4))
        0: fn = 6'h20; 1: fn = 6'h22; 2: fn = 6'h24; 3: fn = 6'h25; default: fn = 6'h2A;
      endcase
      instruction[5:0] = fn;
      signExtend[5:0] = fn;
      b = ALU_Src ? signExtend : in2;
      if (ALU_Op == 2'b00) r = in1 + b;
      else if (ALU_Op == 2'b01) r = in1 - b;
      else case (fn)
        6'h20: r = in1 + b;
        6'h22: r = in1 - b;
        6'h24: r = in1 & b;
        6'h25: r = in1 | b;
        default: r = ($signed(in1) < $signed(b)) ? 32'd1 : 32'd0;
      endcase
      #1;
      checks++;
      if (aluResult !== r || zero !== (r == 0) || branchTarget !== adder_in + (signExtend << 2) ||
          RegDstMux_out !== (RegDst ? instruction[15:11] : instruction[20:16])) begin
        failures++;
        $display("FAIL op=%0d fn=%h res=%h exp=%h dst=%0d", ALU_Op, fn, aluResult, r, RegDstMux_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
