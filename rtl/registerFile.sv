// registerFile: 32 x 32-bit MIPS register file, two read ports, one write port.
//
// Reads are combinational from rs/rt. A write of wdata to register wa happens
// on the rising clock edge when we is set; register 0 ($zero) is never
// written and always reads 0. A synchronous active-high rst clears all
// registers. There is no write-to-read bypass, so a value written at the end
// of a cycle is visible from the next cycle on. Used inside both decode
// units; its size, reset and write timing are this design's choices.
module registerFile (
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  ra1,
  input  logic [4:0]  ra2,
  input  logic        we,
  input  logic [4:0]  wa,
  input  logic [31:0] wdata,
  output logic [31:0] rd1,
  output logic [31:0] rd2
);
  logic [31:0] regs [32];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (we && wa != 5'd0) begin
      regs[wa] <= wdata;
    end
  end

  always_comb begin
    rd1 = (ra1 == 5'd0) ? '0 : regs[ra1];
    rd2 = (ra2 == 5'd0) ? '0 : regs[ra2];
  end
endmodule
