// datapath: the single-cycle datapath with every control point as an input.
//
// The fetch unit supplies Instruction<31:0>; its fields feed the rest:
// Rs = <25:21> and Rt = <20:16> address the register file's read ports,
// Rd = <15:11>, Imm16 = <15:0>. In one cycle an instruction flows
//   register file -> (busA, ALUSrc mux of busB / extended imm16) -> ALU
//   -> data memory address -> MemtoReg mux -> busW -> register file,
// and the destination register is rd or rt by RegDst. The ALU's Zero output
// goes back to the fetch unit for beq. The store data (Data In) is busB, i.e.
// R[rt]. The register file, data memory and PC all update at the same rising
// clock edge that ends the cycle; everything in between is combinational.
// instr goes out to the controller, and pc, rw, busw, alu_out and busb are
// brought out so the writes of each cycle can be observed.
module datapath
  import cpu_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned DMEM_WORDS = 256
) (
  input  logic        clk,
  input  logic        rst,
  input  ctrl_t       ctrl,
  output logic [31:0] instr,
  input  logic        imem_we,
  input  logic [31:0] imem_waddr,
  input  logic [31:0] imem_wdata,
  output logic [31:0] pc,
  output regaddr_t    rw,
  output logic [31:0] busw,
  output logic [31:0] alu_out,
  output logic [31:0] busb
);

  regaddr_t    rs, rt, rd;
  logic [15:0] imm16;
  logic [31:0] busa, imm32, alu_b, mem_out;
  logic        zero;

  always_comb begin
    rs    = instr[25:21];
    rt    = instr[20:16];
    rd    = instr[15:11];
    imm16 = instr[15:0];
  end

  instr_fetch_unit #(.IMEM_WORDS(IMEM_WORDS)) u_ifu (
    .clk        (clk),
    .rst        (rst),
    .npc_sel    (ctrl.npc_sel),
    .zero       (zero),
    .jump       (ctrl.jump),
    .imem_we    (imem_we),
    .imem_waddr (imem_waddr),
    .imem_wdata (imem_wdata),
    .pc         (pc),
    .instr      (instr)
  );

  mux2 #(.WIDTH(5)) u_regdst_mux (
    .sel (ctrl.reg_dst),
    .d0  (rt),
    .d1  (rd),
    .y   (rw)
  );

  regfile #(.NREGS(32), .WIDTH(32)) u_regfile (
    .clk  (clk),
    .rst  (rst),
    .we   (ctrl.reg_wr),
    .rw   (rw),
    .ra   (rs),
    .rb   (rt),
    .busw (busw),
    .busa (busa),
    .busb (busb)
  );

  extender u_ext (
    .ext_op (ctrl.ext_op),
    .imm16  (imm16),
    .imm32  (imm32)
  );

  mux2 #(.WIDTH(32)) u_alusrc_mux (
    .sel (ctrl.alu_src),
    .d0  (busb),
    .d1  (imm32),
    .y   (alu_b)
  );

  alu #(.WIDTH(32)) u_alu (
    .alu_ctr (ctrl.alu_ctr),
    .a       (busa),
    .b       (alu_b),
    .result  (alu_out),
    .zero    (zero)
  );

  data_memory #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk      (clk),
    .wr_en    (ctrl.mem_wr),
    .adr      (alu_out),
    .data_in  (busb),
    .data_out (mem_out)
  );

  mux2 #(.WIDTH(32)) u_memtoreg_mux (
    .sel (ctrl.mem_to_reg),
    .d0  (alu_out),
    .d1  (mem_out),
    .y   (busw)
  );

endmodule
