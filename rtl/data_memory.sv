// data_memory: data memory of the single-cycle processor.
//
// Reads are combinational: data_out = MEM[adr] in the same cycle, which is
// what lw needs to write the loaded word back before the cycle ends. When
// WrEn (MemWr) is 1, data_in is written to MEM[adr] at the rising clock edge.
// adr is a byte address; only whole words are accessed, so the memory is
// indexed by adr[AW+1:2]. The depth (256 words) and the word-only access are
// this design's choices; the contents are not reset.
module data_memory #(
  parameter int unsigned WORDS = 256,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic        wr_en,
  input  logic [31:0] adr,
  input  logic [31:0] data_in,
  output logic [31:0] data_out
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[adr[AW+1:2]] <= data_in;
  end

  always_comb data_out = mem[adr[AW+1:2]];

endmodule
