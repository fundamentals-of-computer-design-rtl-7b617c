// instructionDecode: decode stage of the single-cycle core.
//
// Reads registers rs (instruction[25:21]) and rt (instruction[20:16]) from a
// 32 x 32 register file, sign-extends instruction[15:0] to 32 bits, and writes
// writeData on the rising clock edge when regWrite is set. The destination is
// chosen here by RegDst: rd (instruction[15:11]) for R-type, rt otherwise,
// because in the single-cycle schematic RegDst enters this block. Reads and
// sign extension are combinational; rst clears the register file.
module instructionDecode (
  input  logic        clk_in,
  input  logic        rst,
  input  logic        RegDst,
  input  logic [31:0] instruction,
  input  logic        regWrite,
  input  logic [31:0] writeData,
  output logic [31:0] readData1,
  output logic [31:0] readData2,
  output logic [31:0] signExtend_out
);
  logic [4:0] write_reg;

  always_comb begin
    write_reg      = RegDst ? instruction[15:11] : instruction[20:16];
    signExtend_out = {{16{instruction[15]}}, instruction[15:0]};
  end

  registerFile u_rf (
    .clk   (clk_in),
    .rst   (rst),
    .ra1   (instruction[25:21]),
    .ra2   (instruction[20:16]),
    .we    (regWrite),
    .wa    (write_reg),
    .wdata (writeData),
    .rd1   (readData1),
    .rd2   (readData2)
  );
endmodule
