// inst_memory: instruction memory of the single-cycle processor.
//
// Instruction = MEM[addr], read combinationally so a fetched instruction is
// available in the cycle its address is on the PC. addr is a byte address; the
// memory holds WORDS 32-bit words and is indexed by addr[AW+1:2] (the two low
// bits of a PC are always 00 and higher bits beyond the depth are ignored).
// The write port (we, waddr, wdata, written at the rising clock edge) exists
// only to load a program before the processor runs; it and the 256-word
// depth are this design's choices.
module inst_memory #(
  parameter int unsigned WORDS = 256,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic [31:0] addr,
  output logic [31:0] instr,
  input  logic        we,
  input  logic [31:0] waddr,
  input  logic [31:0] wdata
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW+1:2]] <= wdata;
  end

  always_comb instr = mem[addr[AW+1:2]];

endmodule
