// memory: data memory, 2**ADDR_BITS words of 32 bits, word-addressed.
//
// On the rising clock edge data_in is written to word addr when wren is set.
// With READ_REG = 1 (default) the address is also captured at that edge and
// data_out shows the word at the captured address for the following cycle,
// like an FPGA block RAM with registered inputs: after a store, data_out
// shows the stored word in the next cycle. With READ_REG = 0 data_out is an
// asynchronous read of addr, which a load (lw) needs to complete in the same
// cycle. Contents start at zero. The 8-bit address follows the schematic;
// the read timing option is this design's choice.
module memory #(
  parameter int unsigned ADDR_BITS = 8,
  parameter bit          READ_REG  = 1'b1
) (
  input  logic                 clk,
  input  logic [ADDR_BITS-1:0] addr,
  input  logic [31:0]          data_in,
  input  logic                 wren,
  output logic [31:0]          data_out
);
  logic [31:0]          mem [2**ADDR_BITS];
  logic [ADDR_BITS-1:0] addr_q;

  initial begin
    foreach (mem[i]) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (wren) mem[addr] <= data_in;
    addr_q <= addr;
  end

  always_comb data_out = READ_REG ? mem[addr_q] : mem[addr];
endmodule
