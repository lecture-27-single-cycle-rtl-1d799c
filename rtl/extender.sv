// extender: widens the 16-bit immediate of an I-type instruction to 32 bits.
//
// ExtOp = 0 ("zero") fills the upper half with zeros, as ori needs;
// ExtOp = 1 ("sign") copies imm16[15] into the upper half, as lw, sw and beq
// need. Which ExtOp value means which extension follows the control table of
// the classic single-cycle design; the circuit itself is combinational with no timing of its own.
module extender (
  input  logic        ext_op,
  input  logic [15:0] imm16,
  output logic [31:0] imm32
);

  always_comb imm32 = {{16{ext_op & imm16[15]}}, imm16};

endmodule
