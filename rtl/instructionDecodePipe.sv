// instructionDecodePipe: decode stage of the pipelined core.
//
// Same register file and sign extension as instructionDecode, but the write
// port is driven entirely by the write-back stage: writeReg, writeData and
// regWrite arrive from the MEM/WB pipeline register, while the read
// addresses come from the ID-stage instruction. Reads are combinational, the
// write happens on the rising clock edge, with no bypass from write to read:
// an instruction reading a register in the same cycle its producer is in
// write-back sees the old value. The port list follows the pipeline
// schematic; rst is this design's addition.
module instructionDecodePipe (
  input  logic        clk_in,
  input  logic        rst,
  input  logic [31:0] instruction,
  input  logic        regWrite,
  input  logic [31:0] writeData,
  input  logic [4:0]  writeReg,
  output logic [31:0] readData1,
  output logic [31:0] readData2,
  output logic [31:0] signExtend_out
);
  always_comb signExtend_out = {{16{instruction[15]}}, instruction[15:0]};

  registerFile u_rf (
    .clk   (clk_in),
    .rst   (rst),
    .ra1   (instruction[25:21]),
    .ra2   (instruction[20:16]),
    .we    (regWrite),
    .wa    (writeReg),
    .wdata (writeData),
    .rd1   (readData1),
    .rd2   (readData2)
  );
endmodule
