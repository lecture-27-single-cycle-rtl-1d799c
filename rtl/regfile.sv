// regfile: 32 general registers of 32 bits with two read ports and one write port.
//
// Ra and Rb select the registers driven onto busA and busB; the reads are
// combinational, so the operands are ready in the same cycle the instruction is
// fetched. When RegWr (we) is 1, busW is written into register Rw at the rising
// clock edge that ends the cycle; a read of Rw in that cycle still returns the
// old value. Register 0 always reads as zero and ignores writes, as the MIPS
// instruction set requires. A synchronous reset clears every register; the
// reset is this design's choice.
module regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             we,
  input  logic [AW-1:0]    rw,
  input  logic [AW-1:0]    ra,
  input  logic [AW-1:0]    rb,
  input  logic [WIDTH-1:0] busw,
  output logic [WIDTH-1:0] busa,
  output logic [WIDTH-1:0] busb
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
    end else if (we && rw != '0) begin
      regs[rw] <= busw;
    end
  end

  always_comb begin
    busa = (ra == '0) ? '0 : regs[ra];
    busb = (rb == '0) ? '0 : regs[rb];
  end

endmodule
