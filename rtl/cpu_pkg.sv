// cpu_pkg: types and constants shared by the single-cycle MIPS-subset processor.
//
// The processor runs seven instructions: add, sub (R-type), ori, lw, sw, beq
// (I-type) and j (J-type). The opcode and function-field values below are the
// standard MIPS encodings of those instructions. ALUctr is two bits wide with
// 00 = ADD, 01 = SUB, 10 = OR; ctrl_t bundles every control point of the
// datapath so the controller and the datapath exchange one struct.
package cpu_pkg;


  // Instruction fields
  typedef logic [5:0] opcode_t;
  typedef logic [5:0] funct_t;
  typedef logic [4:0] regaddr_t;

  localparam opcode_t OP_RTYPE = 6'b00_0000;
  localparam opcode_t OP_ORI   = 6'b00_1101;
  localparam opcode_t OP_LW    = 6'b10_0011;
  localparam opcode_t OP_SW    = 6'b10_1011;
  localparam opcode_t OP_BEQ   = 6'b00_0100;
  localparam opcode_t OP_J     = 6'b00_0010;

  localparam funct_t FN_ADD = 6'b10_0000;
  localparam funct_t FN_SUB = 6'b10_0010;

  // ALU operation select
  typedef enum logic [1:0] {
    ALU_ADD = 2'b00,
    ALU_SUB = 2'b01,
    ALU_OR  = 2'b10
  } alu_ctr_t;

  // Control points of the datapath, one value per instruction
  typedef struct packed {
    logic     reg_dst;    // 0: write rt, 1: write rd
    logic     alu_src;    // 0: busB, 1: extended immediate
    logic     mem_to_reg; // 0: ALU output, 1: data memory output
    logic     reg_wr;     // write the register file
    logic     mem_wr;     // write the data memory
    logic     npc_sel;    // 0: "+4", 1: "br" (taken when Zero)
    logic     jump;       // next PC is the jump target
    logic     ext_op;     // 0: zero-extend imm16, 1: sign-extend
    alu_ctr_t alu_ctr;
  } ctrl_t;

endpackage
