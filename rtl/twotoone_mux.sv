// twotoone_mux: WIDTH-bit two-input multiplexer, y = sel ? b : a.
//
// Both cores use two of them: one picks the next PC (a = PC+4, b = branch
// target) and one picks the write-back value (a = ALU result, b = data memory
// read data). Purely combinational. That sel=1 selects b is this design's
// choice; the width of 32 follows the datapath.
module twotoone_mux #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);
  always_comb y = sel ? b : a;
endmodule
