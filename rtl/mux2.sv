// mux2: two-input multiplexer of parameterised width.
//
// The datapath uses three of these as its steering points, each driven by one
// control signal: RegDst picks the destination register number (rt on input 0,
// rd on input 1), ALUSrc picks the ALU's second operand (busB on 0, extended
// immediate on 1) and MemtoReg picks what is written back (ALU output on 0,
// data memory on 1). The input numbering follows the classic
// single-cycle datapath; the width parameter is this design's own.
// Purely combinational: y follows sel, d0 and d1 within the cycle.
module mux2 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  output logic [WIDTH-1:0] y
);

  always_comb y = sel ? d1 : d0;

endmodule
