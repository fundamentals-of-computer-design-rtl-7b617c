// mips_pipeline: five-stage pipelined MIPS processor (F, D, E, M, W).
//
// The single-cycle units are separated by four pipeline registers:
//   F  instructionFetch                 -> IF/ID  (PC+4, instruction)
//   D  controlUnit, instructionDecodePipe -> ID/EX (controls, PC+4,
//      instruction, immediate, rs/rt values)
//   E  executionUnitPipe (ALU, branch target, rd/rt select) -> EX/MEM
//   M  data memory; the branch is resolved here from EX/MEM Branch and zero
//      -> MEM/WB (ALU result, read data, destination, MemtoReg, RegWrite)
//   W  write-back mux into the register file of the D stage.
// Instruction k (counting from 0 after reset) is fetched in cycle k+1 and
// writes its register at the end of cycle k+5.
//
// There is no forwarding, no hazard detection and no flush. A consumer must
// be at least three instructions behind its producer (the register file has
// no write-through), which the program ensures with no-op words; a closer
// consumer reads the old register value. A beq taken in M redirects the PC
// at the end of that cycle, and the three instructions fetched after the beq
// still complete. The stage split, the pipeline registers' contents and the
// branch in M follow the pipeline schematic; the reset, sizes and data
// memory read timing (see mips_single_cycle) are this design's choices.
module mips_pipeline #(
  parameter string       PROGRAM        = "rtl/prog_pipeline.hex",
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
  output logic [31:0] dataMemOut,
  output logic [31:0] instructionIF_out,
  output logic [4:0]  writeRegister_out,
  output logic [31:0] writebackData_out
);
  // F
  logic [31:0] if_pc_plus4, next_pc;
  // D
  logic [31:0] id_pc_plus4, id_instr, id_sign_ext;
  logic [1:0]  id_alu_op;
  logic        id_alu_src, id_branch, id_mem_write, id_mem_to_reg, id_reg_dst, id_reg_write;
  // E
  logic [31:0] ex_pc_plus4, ex_instr, ex_sign_ext, ex_rd1, ex_rd2, ex_branch_target;
  logic [1:0]  ex_alu_op;
  logic        ex_alu_src, ex_branch, ex_mem_write, ex_mem_to_reg, ex_reg_dst, ex_reg_write;
  logic [4:0]  ex_dest;
  // M
  logic [31:0] mem_alu_result, mem_branch_target, mem_store_data;
  logic        mem_branch, mem_mem_write, mem_mem_to_reg, mem_reg_write, mem_zero;
  logic [4:0]  mem_dest;
  logic        pc_src;
  // W
  logic [31:0] wb_alu_result, wb_read_data;
  logic        wb_mem_to_reg, wb_reg_write;

  // ---------------- F ----------------
  instructionFetch #(.IMEM_WORDS(IMEM_WORDS), .INIT_FILE(PROGRAM)) instFetch_inst (
    .clk_in          (clk),
    .rst             (rst),
    .load_address_in (next_pc),
    .adder_out       (if_pc_plus4),
    .instruction_out (instructionIF_out)
  );

  mux4_select pcsrc_select (.Branch(mem_branch), .zero(mem_zero), .PCSrc(pc_src));

  twotoone_mux #(.WIDTH(32)) pcsrc_two_to_one_mux_inst (
    .a(if_pc_plus4), .b(mem_branch_target), .sel(pc_src), .y(next_pc)
  );

  InstructionFetchInstructionDecodeReg IFID_inst (
    .clk             (clk),
    .rst             (rst),
    .adder_in        (if_pc_plus4),
    .instruction_in  (instructionIF_out),
    .adder_out       (id_pc_plus4),
    .instruction_out (id_instr)
  );

  // ---------------- D ----------------
  controlUnit control_unit_inst (
    .opcode   (id_instr[31:26]),
    .ALUOp    (id_alu_op),
    .AluSrc   (id_alu_src),
    .Branch   (id_branch),
    .MemWrite (id_mem_write),
    .MemtoReg (id_mem_to_reg),
    .RegDst   (id_reg_dst),
    .RegWrite (id_reg_write)
  );

  instructionDecodePipe instDecode_inst (
    .clk_in         (clk),
    .rst            (rst),
    .instruction    (id_instr),
    .regWrite       (wb_reg_write),
    .writeData      (writebackData_out),
    .writeReg       (writeRegister_out),
    .readData1      (readData1),
    .readData2      (readData2),
    .signExtend_out (id_sign_ext)
  );

  InstructionDecodeExecutionReg IDEX_inst (
    .clk                       (clk),
    .rst                       (rst),
    .ALUOp_in                  (id_alu_op),
    .ALUSrc_in                 (id_alu_src),
    .Branch_in                 (id_branch),
    .MemWrite_in               (id_mem_write),
    .MemtoReg_in               (id_mem_to_reg),
    .RegDst_in                 (id_reg_dst),
    .RegWrite_in               (id_reg_write),
    .adder_in                  (id_pc_plus4),
    .instruction_in            (id_instr),
    .instructionsignextend_in  (id_sign_ext),
    .readData1_in              (readData1),
    .readData2_in              (readData2),
    .ALUOp_out                 (ex_alu_op),
    .ALUSrc_out                (ex_alu_src),
    .Branch_out                (ex_branch),
    .MemWrite_out              (ex_mem_write),
    .MemtoReg_out              (ex_mem_to_reg),
    .RegDst_out                (ex_reg_dst),
    .RegWrite_out              (ex_reg_write),
    .adder_out                 (ex_pc_plus4),
    .instruction_out           (ex_instr),
    .instructionsignextend_out (ex_sign_ext),
    .readData1_out             (ex_rd1),
    .readData2_out             (ex_rd2)
  );

  // ---------------- E ----------------
  executionUnitPipe executionUnit_inst (
    .ALU_Op        (ex_alu_op),
    .ALU_Src       (ex_alu_src),
    .RegDst        (ex_reg_dst),
    .adder_in      (ex_pc_plus4),
    .instruction   (ex_instr),
    .in1           (ex_rd1),
    .in2           (ex_rd2),
    .signExtend    (ex_sign_ext),
    .RegDstMux_out (ex_dest),
    .aluResult     (aluResult),
    .branchTarget  (ex_branch_target),
    .zero          (zero)
  );

  ExecutionMemoryReg EXMEM_inst (
    .clk             (clk),
    .rst             (rst),
    .ALUResult_in    (aluResult),
    .Branch_in       (ex_branch),
    .MemWrite_in     (ex_mem_write),
    .MemtoReg_in     (ex_mem_to_reg),
    .RegDstMux_in    (ex_dest),
    .RegWrite_in     (ex_reg_write),
    .adderbranch_in  (ex_branch_target),
    .readData2_in    (ex_rd2),
    .zero_in         (zero),
    .ALUResult_out   (mem_alu_result),
    .Branch_out      (mem_branch),
    .MemWrite_out    (mem_mem_write),
    .MemtoReg_out    (mem_mem_to_reg),
    .RegDstMux_out   (mem_dest),
    .RegWrite_out    (mem_reg_write),
    .adderbranch_out (mem_branch_target),
    .readData2_out   (mem_store_data),
    .zero_out        (mem_zero)
  );

  // ---------------- M ----------------
  memory #(.ADDR_BITS(DMEM_ADDR_BITS), .READ_REG(DMEM_READ_REG)) memory_inst (
    .clk      (clk),
    .addr     (mem_alu_result[DMEM_ADDR_BITS-1:0]),
    .data_in  (mem_store_data),
    .wren     (mem_mem_write),
    .data_out (dataMemOut)
  );

  MemoryWritebackReg MEMWB_inst (
    .clk            (clk),
    .rst            (rst),
    .DMaddress_in   (mem_alu_result),
    .DMreadData_in  (dataMemOut),
    .MemtoReg_in    (mem_mem_to_reg),
    .RegDstMux_in   (mem_dest),
    .RegWrite_in    (mem_reg_write),
    .DMaddress_out  (wb_alu_result),
    .DMreadData_out (wb_read_data),
    .MemtoReg_out   (wb_mem_to_reg),
    .RegDstMux_out  (writeRegister_out),
    .RegWrite_out   (wb_reg_write)
  );

  // ---------------- W ----------------
  twotoone_mux #(.WIDTH(32)) writeback_two_to_one_mux_inst (
    .a(wb_alu_result), .b(wb_read_data), .sel(wb_mem_to_reg), .y(writebackData_out)
  );
endmodule
