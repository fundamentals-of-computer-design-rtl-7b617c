// MemoryWritebackReg_tb: drives random values into the pipeline register and checks
// that each output equals its input one rising clock edge later, holds
// between edges, and that reset clears every field.
module MemoryWritebackReg_tb;
  logic clk = 0, rst;
  logic [31:0] DMaddress_in, DMaddress_out;
  logic [31:0] DMreadData_in, DMreadData_out;
  logic [0:0] MemtoReg_in, MemtoReg_out;
  logic [4:0] RegDstMux_in, RegDstMux_out;
  logic [0:0] RegWrite_in, RegWrite_out;
  logic [70:0] sent;
  int checks = 0, failures = 0;

  MemoryWritebackReg dut (
    .clk(clk), .rst(rst),
    .DMaddress_in(DMaddress_in), .DMaddress_out(DMaddress_out),
    .DMreadData_in(DMreadData_in), .DMreadData_out(DMreadData_out),
    .MemtoReg_in(MemtoReg_in), .MemtoReg_out(MemtoReg_out),
    .RegDstMux_in(RegDstMux_in), .RegDstMux_out(RegDstMux_out),
    .RegWrite_in(RegWrite_in), .RegWrite_out(RegWrite_out)
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
    {DMaddress_in, DMreadData_in, MemtoReg_in, RegDstMux_in, RegWrite_in} = 71'({ $urandom, $urandom, $urandom });
    for (int i = 0; i < 500; i++) begin
      @(posedge clk); #1;
      sent = {DMaddress_in, DMreadData_in, MemtoReg_in, RegDstMux_in, RegWrite_in};
      {DMaddress_in, DMreadData_in, MemtoReg_in, RegDstMux_in, RegWrite_in} = 71'({ $urandom, $urandom, $urandom });
      rst = (i % 97 == 50);
      #1;
      checks++;
      if ({DMaddress_out, DMreadData_out, MemtoReg_out, RegDstMux_out, RegWrite_out} !== sent) begin
        failures++;
        $display("FAIL cycle %0d: out=%h exp=%h", i, {DMaddress_out, DMreadData_out, MemtoReg_out, RegDstMux_out, RegWrite_out}, sent);
      end
      if (rst) begin
        @(posedge clk); #1;
        rst = 0;
        checks++;
        if ({DMaddress_out, DMreadData_out, MemtoReg_out, RegDstMux_out, RegWrite_out} !== '0) begin
          failures++;
          $display("FAIL reset: out=%h", {DMaddress_out, DMreadData_out, MemtoReg_out, RegDstMux_out, RegWrite_out});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
