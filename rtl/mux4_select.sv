// mux4_select: PC-source select for beq.
//
// Drives the select of the PC multiplexer: the branch target is taken only
// when the current (single-cycle) or MEM-stage (pipeline) instruction is a
// branch and the ALU compare gave zero. Combinational, no timing of its own.
// The block's name and its place in front of the PC mux follow the schematic;
// the Branch-and-zero rule and the port names are this design's choice.
module mux4_select (
  input  logic Branch,
  input  logic zero,
  output logic PCSrc
);
  always_comb PCSrc = Branch & zero;
endmodule
