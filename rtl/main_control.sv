// main_control: the single-cycle processor's controller.
//
// A purely combinational decoder. It first recognises each instruction from
// the opcode (and, for R-type, the function field), then forms every control
// point as an OR of the instructions that need it:
//   RegDst = add + sub            ALUSrc   = ori + lw + sw
//   MemtoReg = lw                 RegWrite = add + sub + ori + lw
//   MemWrite = sw                 nPC_sel  = beq
//   Jump = jump                   ExtOp    = lw + sw
//   ALUctr[0] = sub + beq         ALUctr[1] = ori
// Signals an instruction does not care about therefore come out 0. An opcode
// or function code outside the seven instructions turns every control point
// off, so it writes nothing and falls through to PC + 4; that handling is this
// design's choice. Two immediate assertions state the rules of the control
// table that the decoder relies on.
module main_control
  import cpu_pkg::*;
(
  input  opcode_t op,
  input  funct_t  func,
  output ctrl_t   ctrl
);

  logic rtype, i_add, i_sub, i_ori, i_lw, i_sw, i_beq, i_jump;

  always_comb begin
    rtype  = (op == OP_RTYPE);
    i_add  = rtype && (func == FN_ADD);
    i_sub  = rtype && (func == FN_SUB);
    i_ori  = (op == OP_ORI);
    i_lw   = (op == OP_LW);
    i_sw   = (op == OP_SW);
    i_beq  = (op == OP_BEQ);
    i_jump = (op == OP_J);

    ctrl.reg_dst    = i_add | i_sub;
    ctrl.alu_src    = i_ori | i_lw | i_sw;
    ctrl.mem_to_reg = i_lw;
    ctrl.reg_wr     = i_add | i_sub | i_ori | i_lw;
    ctrl.mem_wr     = i_sw;
    ctrl.npc_sel    = i_beq;
    ctrl.jump       = i_jump;
    ctrl.ext_op     = i_lw | i_sw;
    ctrl.alu_ctr    = alu_ctr_t'({i_ori, i_sub | i_beq});
  end

  // At most one instruction is recognised, and no instruction both writes a
  // register and writes memory.
  always_comb begin
    assert ($onehot0({i_add, i_sub, i_ori, i_lw, i_sw, i_beq, i_jump}));
    assert (!(ctrl.reg_wr && ctrl.mem_wr));
  end

endmodule
