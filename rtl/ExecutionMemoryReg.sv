// ExecutionMemoryReg: EX/MEM pipeline register.
//
// Carries the ALU result, the zero flag, the branch target (adderbranch),
// the store data (readData2), the destination register index and the
// Branch / MemWrite / MemtoReg / RegWrite controls into the memory stage,
// one rising clock edge later. The branch decision is made from this
// register's Branch and zero outputs. Port names follow the schematic. A
// synchronous, active-high rst clears it to a bubble (this design's choice).
module ExecutionMemoryReg (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] ALUResult_in,
  input  logic        Branch_in,
  input  logic        MemWrite_in,
  input  logic        MemtoReg_in,
  input  logic [4:0]  RegDstMux_in,
  input  logic        RegWrite_in,
  input  logic [31:0] adderbranch_in,
  input  logic [31:0] readData2_in,
  input  logic        zero_in,
  output logic [31:0] ALUResult_out,
  output logic        Branch_out,
  output logic        MemWrite_out,
  output logic        MemtoReg_out,
  output logic [4:0]  RegDstMux_out,
  output logic        RegWrite_out,
  output logic [31:0] adderbranch_out,
  output logic [31:0] readData2_out,
  output logic        zero_out
);
  always_ff @(posedge clk) begin
    if (rst) begin
      ALUResult_out   <= '0;
      Branch_out      <= 1'b0;
      MemWrite_out    <= 1'b0;
      MemtoReg_out    <= 1'b0;
      RegDstMux_out   <= '0;
      RegWrite_out    <= 1'b0;
      adderbranch_out <= '0;
      readData2_out   <= '0;
      zero_out        <= 1'b0;
    end else begin
      ALUResult_out   <= ALUResult_in;
      Branch_out      <= Branch_in;
      MemWrite_out    <= MemWrite_in;
      MemtoReg_out    <= MemtoReg_in;
      RegDstMux_out   <= RegDstMux_in;
      RegWrite_out    <= RegWrite_in;
      adderbranch_out <= adderbranch_in;
      readData2_out   <= readData2_in;
      zero_out        <= zero_in;
    end
  end
endmodule
