// MemoryWritebackReg: MEM/WB pipeline register.
//
// Carries the ALU result (DMaddress), the data memory read data, the
// destination register index and the MemtoReg / RegWrite controls into the
// write-back stage, one rising clock edge later. Port names follow the
// schematic. A synchronous, active-high rst clears it, so no register is
// written while the pipeline fills (this design's choice).
module MemoryWritebackReg (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] DMaddress_in,
  input  logic [31:0] DMreadData_in,
  input  logic        MemtoReg_in,
  input  logic [4:0]  RegDstMux_in,
  input  logic        RegWrite_in,
  output logic [31:0] DMaddress_out,
  output logic [31:0] DMreadData_out,
  output logic        MemtoReg_out,
  output logic [4:0]  RegDstMux_out,
  output logic        RegWrite_out
);
  always_ff @(posedge clk) begin
    if (rst) begin
      DMaddress_out  <= '0;
      DMreadData_out <= '0;
      MemtoReg_out   <= 1'b0;
      RegDstMux_out  <= '0;
      RegWrite_out   <= 1'b0;
    end else begin
      DMaddress_out  <= DMaddress_in;
      DMreadData_out <= DMreadData_in;
      MemtoReg_out   <= MemtoReg_in;
      RegDstMux_out  <= RegDstMux_in;
      RegWrite_out   <= RegWrite_in;
    end
  end
endmodule
