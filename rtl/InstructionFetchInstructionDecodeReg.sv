// InstructionFetchInstructionDecodeReg: IF/ID pipeline register.
//
// Captures PC+4 (adder) and the fetched instruction on every rising clock
// edge and presents them to the decode stage for the next cycle. It has no
// enable and no flush, as in the schematic: the pipeline never stalls and a
// taken branch does not squash the instructions behind it. A synchronous,
// active-high rst loads zeros, i.e. an all-zero no-op instruction (this
// design's choice).
module InstructionFetchInstructionDecodeReg (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] adder_in,
  input  logic [31:0] instruction_in,
  output logic [31:0] adder_out,
  output logic [31:0] instruction_out
);
  always_ff @(posedge clk) begin
    if (rst) begin
      adder_out       <= '0;
      instruction_out <= '0;
    end else begin
      adder_out       <= adder_in;
      instruction_out <= instruction_in;
    end
  end
endmodule
