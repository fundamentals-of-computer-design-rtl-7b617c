// instructionFetch: program counter and instruction memory.
//
// The PC is a 32-bit byte address that loads load_address_in on every rising
// clock edge (the next PC chosen outside by the PC multiplexer) and clears to
// 0 on a synchronous, active-high rst. The instruction memory is a word array
// of IMEM_WORDS entries read asynchronously at PC[..:2], so instruction_out and
// adder_out (= PC + 4) are valid in the same cycle the PC changes. The memory
// is loaded from INIT_FILE with $readmemh (one 32-bit hex word per line),
// which plays the role of a memory initialization file (a synthesis tool that
// ignores $readmemh sees an all-zero ROM and removes it). The ports follow the
// schematic; the reset, the depth and the asynchronous read are this
// design's choices.
module instructionFetch #(
  parameter int unsigned IMEM_WORDS = 256,
  parameter string       INIT_FILE  = "rtl/prog_single_cycle.hex"
) (
  input  logic        clk_in,
  input  logic        rst,
  input  logic [31:0] load_address_in,
  output logic [31:0] adder_out,
  output logic [31:0] instruction_out
);
  localparam int unsigned AW = $clog2(IMEM_WORDS);

  logic [31:0] imem [IMEM_WORDS];
  logic [31:0] pc;

  initial begin
    foreach (imem[i]) imem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, imem);
  end

  always_ff @(posedge clk_in) begin
    if (rst) pc <= '0;
    else     pc <= load_address_in;
  end

  always_comb begin
    adder_out       = pc + 32'd4;
    instruction_out = imem[pc[AW+1:2]];
  end
endmodule
