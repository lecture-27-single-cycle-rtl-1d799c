// single_cycle_cpu: a processor that executes one MIPS-subset instruction per clock.
//
// Seven instructions are supported: add, sub, ori, lw, sw, beq and j. The
// processor is the controller (main_control), which turns the opcode and
// function field of the current instruction into the datapath's control
// points, and the datapath, which holds the PC, instruction memory, register
// file, extender, ALU, data memory and steering muxes. Each clock cycle
// fetches, decodes, executes and writes back one instruction; the clock period
// must cover the whole path from PC through instruction memory, register
// file, ALU and data memory back to busW.
//
// Interface: rst (synchronous, active high) sets the PC and the registers to
// 0. While rst is held, a program is written into the instruction memory
// through imem_we / imem_waddr (byte address) / imem_wdata, one word per
// clock. The remaining outputs show the current PC and instruction and the
// register-file and data-memory writes that happen at the end of the cycle.
// The reset, the load port and the 256-word memory depths are this design's
// choices; the instruction set, control table and datapath follow the
// classic single-cycle MIPS design.
module single_cycle_cpu
  import cpu_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned DMEM_WORDS = 256
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        imem_we,
  input  logic [31:0] imem_waddr,
  input  logic [31:0] imem_wdata,
  output logic [31:0] pc,
  output logic [31:0] instr,
  output logic        reg_we,
  output logic [4:0]  reg_waddr,
  output logic [31:0] reg_wdata,
  output logic        mem_we,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata
);

  ctrl_t ctrl;

  main_control u_ctrl (
    .op   (instr[31:26]),
    .func (instr[5:0]),
    .ctrl (ctrl)
  );

  datapath #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_dp (
    .clk        (clk),
    .rst        (rst),
    .ctrl       (ctrl),
    .instr      (instr),
    .imem_we    (imem_we),
    .imem_waddr (imem_waddr),
    .imem_wdata (imem_wdata),
    .pc         (pc),
    .rw         (reg_waddr),
    .busw       (reg_wdata),
    .alu_out    (mem_addr),
    .busb       (mem_wdata)
  );

  always_comb begin
    reg_we = ctrl.reg_wr;
    mem_we = ctrl.mem_wr;
  end

endmodule
