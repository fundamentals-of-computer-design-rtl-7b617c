// mips_top: the two MIPS processors side by side.
//
// A single-cycle core (ports prefixed sc_) and a five-stage pipelined core
// (ports prefixed pl_) share the clock and reset but nothing else; each runs
// its own program from its own instruction memory. The defaults load the
// reference programs: three addi instructions that load $t1 = 0x112,
// $t2 = 0xA, $t3 = 0xF, then beq $t1,$t2 (not taken), add, sw $t3,100($t2)
// and or. The pipelined program has three no-op words after the load phase
// so that no instruction reads a register before it has been written.
// rst is synchronous and active high; hold it for at least one clock edge.
module mips_top #(
  parameter string SC_PROGRAM = "rtl/prog_single_cycle.hex",
  parameter string PL_PROGRAM = "rtl/prog_pipeline.hex"
) (
  input  logic        clk,
  input  logic        rst,
  output logic [31:0] sc_aluResult,
  output logic        sc_zero,
  output logic [31:0] sc_readData1,
  output logic [31:0] sc_readData2,
  output logic [31:0] sc_dataMemOut,
  output logic [31:0] pl_aluResult,
  output logic        pl_zero,
  output logic [31:0] pl_readData1,
  output logic [31:0] pl_readData2,
  output logic [31:0] pl_dataMemOut,
  output logic [31:0] pl_instructionIF_out,
  output logic [4:0]  pl_writeRegister_out,
  output logic [31:0] pl_writebackData_out
);
  mips_single_cycle #(.PROGRAM(SC_PROGRAM)) u_single_cycle (
    .clk        (clk),
    .rst        (rst),
    .aluResult  (sc_aluResult),
    .zero       (sc_zero),
    .readData1  (sc_readData1),
    .readData2  (sc_readData2),
    .dataMemOut (sc_dataMemOut)
  );

  mips_pipeline #(.PROGRAM(PL_PROGRAM)) u_pipeline (
    .clk               (clk),
    .rst               (rst),
    .aluResult         (pl_aluResult),
    .zero              (pl_zero),
    .readData1         (pl_readData1),
    .readData2         (pl_readData2),
    .dataMemOut        (pl_dataMemOut),
    .instructionIF_out (pl_instructionIF_out),
    .writeRegister_out (pl_writeRegister_out),
    .writebackData_out (pl_writebackData_out)
  );
endmodule
