// mips_single_cycle: single-cycle MIPS processor.
//
// One instruction completes per clock period. In each period the PC selects
// an instruction (instructionFetch), the opcode is decoded (controlUnit), the
// registers are read and the immediate sign-extended (instructionDecode), the
// ALU and branch-target adder work (executionUnit), and on the closing rising
// edge the PC, the register file and (for sw) the data memory are updated.
// Next PC = branch target when the instruction is beq and the ALU difference
// is zero (mux4_select), else PC+4. The write-back value is the ALU result,
// or the data memory output when MemtoReg.
//
// The data memory is addressed by aluResult[7:0]. With DMEM_READ_REG = 1
// (default) its read address is registered, so dataMemOut shows a stored word
// in the cycle after the store, and a lw would write back a value one cycle
// late; set DMEM_READ_REG = 0 for programs that load. The block structure,
// instance roles and observation ports follow the single-cycle schematic; the
// reset and the memory sizes are this design's choices.
module mips_single_cycle #(
  parameter string       PROGRAM        = "rtl/prog_single_cycle.hex",
  parameter int unsigned IMEM_WORDS     = 256,
  parameter int unsigned DMEM_ADDR_BITS = 8,
  parameter bit          DMEM_READ_REG  = 1'b1
) (
  input  logic        clk,
  input  logic        rst,
  output logic [31:0] aluResult,
  output logic        zero,
  output logic [31:0] readData1,
  output logic [31:0] readData2,
  output logic [31:0] dataMemOut
);
  logic [31:0] pc_plus4, instruction, next_pc, branch_target;
  logic [31:0] sign_ext, write_data;
  logic [1:0]  alu_op;
  logic        alu_src, branch, mem_write, mem_to_reg, reg_dst, reg_write;
  logic        pc_src;

  instructionFetch #(.IMEM_WORDS(IMEM_WORDS), .INIT_FILE(PROGRAM)) instFetch (
    .clk_in          (clk),
    .rst             (rst),
    .load_address_in (next_pc),
    .adder_out       (pc_plus4),
    .instruction_out (instruction)
  );

  controlUnit control_unit_inst (
    .opcode   (instruction[31:26]),
    .ALUOp    (alu_op),
    .AluSrc   (alu_src),
    .Branch   (branch),
    .MemWrite (mem_write),
    .MemtoReg (mem_to_reg),
    .RegDst   (reg_dst),
    .RegWrite (reg_write)
  );

  instructionDecode instDecode_inst (
    .clk_in         (clk),
    .rst            (rst),
    .RegDst         (reg_dst),
    .instruction    (instruction),
    .regWrite       (reg_write),
    .writeData      (write_data),
    .readData1      (readData1),
    .readData2      (readData2),
    .signExtend_out (sign_ext)
  );

  executionUnit executionUnit_inst (
    .ALU_Op       (alu_op),
    .ALU_Src      (alu_src),
    .adder_in     (pc_plus4),
    .in1          (readData1),
    .in2          (readData2),
    .signExtend   (sign_ext),
    .aluResult    (aluResult),
    .branchTarget (branch_target),
    .zero         (zero)
  );

  memory #(.ADDR_BITS(DMEM_ADDR_BITS), .READ_REG(DMEM_READ_REG)) memory_inst (
    .clk      (clk),
    .addr     (aluResult[DMEM_ADDR_BITS-1:0]),
    .data_in  (readData2),
    .wren     (mem_write),
    .data_out (dataMemOut)
  );

  mux4_select pcsrc_select (.Branch(branch), .zero(zero), .PCSrc(pc_src));

  twotoone_mux #(.WIDTH(32)) pcsrc_two_to_one_mux_inst (
    .a(pc_plus4), .b(branch_target), .sel(pc_src), .y(next_pc)
  );

  twotoone_mux #(.WIDTH(32)) writeback_two_to_one_mux_inst (
    .a(aluResult), .b(dataMemOut), .sel(mem_to_reg), .y(write_data)
  );
endmodule
