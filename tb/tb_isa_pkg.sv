// tb_isa_pkg: instruction-level reference model and assembler helpers for the
// processor testbenches.
//
// isa_model executes the seven-instruction MIPS subset (add, sub, ori, lw,
// sw, beq, j) one instruction at a time on its own copy of the PC, registers
// and memories, and reports the register and memory write each instruction
// makes and the next PC. Memories are word-indexed by the address bits just
// above the byte offset, wrapping at their size, like the RTL. ctrl_of gives
// the control word of an instruction from the instruction semantics, so the
// datapath can be tested without the RTL controller.
package tb_isa_pkg;
  import cpu_pkg::*;

  typedef enum int {K_ADD, K_SUB, K_ORI, K_LW, K_SW, K_BEQ_T, K_BEQ_N, K_J, K_OTHER, K_N} kind_t;

  typedef struct {
    logic        reg_we;
    logic [4:0]  reg_waddr;
    logic [31:0] reg_wdata;
    logic        mem_we;
    logic [31:0] mem_addr;
    logic [31:0] mem_wdata;
    logic [31:0] next_pc;
    kind_t       kind;
  } effect_t;

  function automatic logic [31:0] enc_r(int rs, int rt, int rd, logic [5:0] fn);
    return {6'b0, 5'(rs), 5'(rt), 5'(rd), 5'b0, fn};
  endfunction
  function automatic logic [31:0] enc_i(logic [5:0] op, int rs, int rt, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] enc_j(int word_target);
    return {6'b00_0010, 26'(word_target)};
  endfunction

  function automatic logic [31:0] sext16(logic [15:0] v);
    return 32'(int'($signed(v)));
  endfunction

  // Control word of an instruction, from what each instruction must do.
  function automatic ctrl_t ctrl_of(logic [31:0] ins);
    ctrl_t c = '0;
    logic [5:0] op = ins[31:26], fn = ins[5:0];
    if (op == 6'h00 && fn == 6'h20) begin c.reg_dst = 1; c.reg_wr = 1; c.alu_ctr = ALU_ADD; end
    if (op == 6'h00 && fn == 6'h22) begin c.reg_dst = 1; c.reg_wr = 1; c.alu_ctr = ALU_SUB; end
    if (op == 6'h0d) begin c.alu_src = 1; c.reg_wr = 1; c.alu_ctr = ALU_OR; end
    if (op == 6'h23) begin c.alu_src = 1; c.reg_wr = 1; c.mem_to_reg = 1; c.ext_op = 1; end
    if (op == 6'h2b) begin c.alu_src = 1; c.mem_wr = 1; c.ext_op = 1; end
    if (op == 6'h04) begin c.npc_sel = 1; c.alu_ctr = ALU_SUB; end
    if (op == 6'h02) c.jump = 1;
    return c;
  endfunction

  class isa_model;
    logic [31:0] regs [32];
    logic [31:0] imem [];
    logic [31:0] dmem [];
    logic [31:0] pc;
    int          ibits, dbits;

    function new(int imem_words, int dmem_words);
      imem = new[imem_words];
      dmem = new[dmem_words];
      ibits = $clog2(imem_words);
      dbits = $clog2(dmem_words);
      foreach (imem[i]) imem[i] = 32'd0;
      reset();
    endfunction

    function void reset();
      foreach (regs[i]) regs[i] = 32'd0;
      foreach (dmem[i]) dmem[i] = 32'd0;
      pc = 32'd0;
    endfunction

    function int iidx(logic [31:0] a); return int'((a >> 2) & ((32'd1 << ibits) - 1)); endfunction
    function int didx(logic [31:0] a); return int'((a >> 2) & ((32'd1 << dbits) - 1)); endfunction

    function logic [31:0] fetch(); return imem[iidx(pc)]; endfunction

    // Execute the instruction at pc, update the state, return what it did.
    function effect_t step();
      effect_t e;
      logic [31:0] ins = fetch();
      logic [5:0]  op = ins[31:26], fn = ins[5:0];
      int rs = int'(ins[25:21]), rt = int'(ins[20:16]), rd = int'(ins[15:11]);
      logic [31:0] a = regs[rs], b = regs[rt];
      logic [31:0] pc4 = pc + 32'd4;
      e = '{reg_we: 0, reg_waddr: 0, reg_wdata: 0, mem_we: 0, mem_addr: 0, mem_wdata: 0,
            next_pc: pc4, kind: K_OTHER};
      if (op == 6'h00 && fn == 6'h20) begin
        e.kind = K_ADD; e.reg_we = 1; e.reg_waddr = 5'(rd); e.reg_wdata = a + b;
      end else if (op == 6'h00 && fn == 6'h22) begin
        e.kind = K_SUB; e.reg_we = 1; e.reg_waddr = 5'(rd); e.reg_wdata = a - b;
      end else if (op == 6'h0d) begin
        e.kind = K_ORI; e.reg_we = 1; e.reg_waddr = 5'(rt); e.reg_wdata = a | {16'd0, ins[15:0]};
      end else if (op == 6'h23) begin
        e.kind = K_LW; e.reg_we = 1; e.reg_waddr = 5'(rt);
        e.mem_addr = a + sext16(ins[15:0]);
        e.reg_wdata = dmem[didx(e.mem_addr)];
      end else if (op == 6'h2b) begin
        e.kind = K_SW; e.mem_we = 1; e.mem_addr = a + sext16(ins[15:0]); e.mem_wdata = b;
      end else if (op == 6'h04) begin
        if (a == b) begin
          e.kind = K_BEQ_T; e.next_pc = pc4 + (sext16(ins[15:0]) << 2);
        end else e.kind = K_BEQ_N;
      end else if (op == 6'h02) begin
        e.kind = K_J; e.next_pc = {pc[31:28], ins[25:0], 2'b00};
      end
      if (e.reg_we && e.reg_waddr != 0) regs[e.reg_waddr] = e.reg_wdata;
      if (e.mem_we) dmem[didx(e.mem_addr)] = e.mem_wdata;
      pc = e.next_pc;
      return e;
    endfunction
  endclass

  // Program that clears the whole data memory (so nothing is read before it is
  // written), then continues at word 6:
  //   0: ori r4,r0,4   1: ori r1,r0,4*dwords   2: sub r1,r1,r4   3: sw r0,0(r1)
  //   4: beq r1,r0,+1  5: j 2
  function automatic void put_prologue(ref logic [31:0] p [], input int dwords);
    p[0] = enc_i(6'h0d, 0, 4, 4);
    p[1] = enc_i(6'h0d, 0, 1, 4 * dwords);
    p[2] = enc_r(1, 4, 1, 6'h22);
    p[3] = enc_i(6'h2b, 1, 0, 0);
    p[4] = enc_i(6'h04, 1, 0, 1);
    p[5] = enc_j(2);
  endfunction

  // A random instruction of the subset at word address at; branch and jump
  // targets stay within words lo..hi.
  function automatic logic [31:0] rand_instr(int at, int lo, int hi);
    int k = $urandom % 8;
    int rs = $urandom % 8, rt = $urandom % 8, rd = $urandom % 8;
    int off;
    case (k)
      0: return enc_r(rs, rt, rd, 6'h20);
      1: return enc_r(rs, rt, rd, 6'h22);
      2: return enc_i(6'h0d, rs, rt, int'($urandom % 65536));
      3: return enc_i(6'h23, rs, rt, int'($urandom % 64) * 4 - 128);
      4: return enc_i(6'h2b, rs, rt, int'($urandom % 64) * 4 - 128);
      5, 6: begin
        off = lo + int'($urandom % (hi - lo + 1)) - (at + 1);
        return enc_i(6'h04, rs, (k == 6) ? rs : rt, off);
      end
      default: return enc_j(lo + int'($urandom % (hi - lo + 1)));
    endcase
  endfunction
endpackage
