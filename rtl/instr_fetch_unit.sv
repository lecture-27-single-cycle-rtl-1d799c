// instr_fetch_unit: program counter, instruction memory and next-PC logic.
//
// Each cycle the unit reads Instruction = MEM[PC] and, at the rising clock
// edge, loads the PC with the next address:
//   * PC + 4                          normally ("+4", nPC_sel = 0);
//   * PC + 4 + SignExt(imm16) * 4     when nPC_sel = 1 ("br") and Zero = 1;
//   * {PC[31:28], target26, 00}       when Jump = 1.
// Two adders make PC + 4 and the branch target; a first mux chooses between
// them with nPC_MUX_sel = nPC_sel AND Zero (the branch condition table), and a
// second mux, driven by Jump, chooses between that result and the jump
// address. imm16 and target26 are taken from the fetched instruction itself.
// The two low PC bits are always loaded with 00.
// Timing: instr, and the next-PC value, depend combinationally on the PC and on
// nPC_sel, Zero and Jump of the same cycle; the PC changes only at the clock
// edge. The synchronous reset to address 0 and the memory's program-load
// port (imem_*) are this design's choices.
module instr_fetch_unit #(
  parameter int unsigned IMEM_WORDS = 256
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        npc_sel,
  input  logic        zero,
  input  logic        jump,
  input  logic        imem_we,
  input  logic [31:0] imem_waddr,
  input  logic [31:0] imem_wdata,
  output logic [31:0] pc,
  output logic [31:0] instr
);

  logic [31:0] pc_plus4, br_target, jmp_target, seq_or_br, next_pc;
  logic [31:0] pc_ext;        // SignExt(imm16) * 4
  logic        npc_mux_sel;

  inst_memory #(.WORDS(IMEM_WORDS)) u_imem (
    .clk   (clk),
    .addr  (pc),
    .instr (instr),
    .we    (imem_we),
    .waddr (imem_waddr),
    .wdata (imem_wdata)
  );

  always_comb begin
    pc_ext      = {{14{instr[15]}}, instr[15:0], 2'b00};
    pc_plus4    = pc + 32'd4;
    br_target   = pc_plus4 + pc_ext;
    jmp_target  = {pc[31:28], instr[25:0], 2'b00};
    npc_mux_sel = npc_sel & zero;
  end

  mux2 #(.WIDTH(32)) u_npc_mux (
    .sel (npc_mux_sel),
    .d0  (pc_plus4),
    .d1  (br_target),
    .y   (seq_or_br)
  );

  mux2 #(.WIDTH(32)) u_jump_mux (
    .sel (jump),
    .d0  (seq_or_br),
    .d1  (jmp_target),
    .y   (next_pc)
  );

  always_ff @(posedge clk) begin
    if (rst) pc <= '0;
    else     pc <= {next_pc[31:2], 2'b00};
  end

endmodule
