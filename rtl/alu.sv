// alu: the datapath's arithmetic-logic unit.
//
// Three operations, chosen by the 2-bit ALUctr: 00 ADD, 01 SUB, 10 OR; the
// unused code 11 gives 0. Add and subtract wrap around modulo 2^WIDTH; no
// overflow is signalled. Zero is 1 exactly when the result is 0, which is how
// beq compares R[rs] with R[rt]: the controller asks for SUB and the fetch
// unit branches on Zero. Combinational: result and zero settle within the
// cycle. The operations, their codes and Zero follow the classic single-cycle
// design; the result for code 11 and the missing overflow flag are this
// design's choices.
module alu
  import cpu_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  alu_ctr_t         alu_ctr,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] result,
  output logic             zero
);

  always_comb begin
    unique case (alu_ctr)
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_OR:  result = a | b;
      default: result = '0;
    endcase
    zero = (result == '0);
  end

endmodule
