// tb_datapath: self-checking test of the datapath with its control points
// driven by the testbench.
//
// The control word of each fetched instruction comes from tb_isa_pkg::ctrl_of,
// written from the instruction semantics rather than from the RTL controller.
// Several random programs are loaded through the instruction-memory port; each
// starts with a loop that clears the data memory. Every cycle the PC, the
// instruction, the register write (Rw, busW) and the memory write (address,
// Data In) are compared with the reference model, which also predicts the next
// PC, so each instruction must complete in exactly one clock.
module tb_datapath;
  import cpu_pkg::*;
  import tb_isa_pkg::*;

  localparam int IW = 256, DW = 256;
  logic        clk = 0, rst, imem_we;
  logic [31:0] imem_waddr, imem_wdata, instr, pc, busw, alu_out, busb;
  logic [4:0]  rw;
  ctrl_t       ctrl;
  int checks = 0, failures = 0;
  int kinds [K_N] = '{default: 0};

  datapath #(.IMEM_WORDS(IW), .DMEM_WORDS(DW)) dut (
    .clk, .rst, .ctrl, .instr, .imem_we, .imem_waddr, .imem_wdata,
    .pc, .rw, .busw, .alu_out, .busb);

  always_comb ctrl = ctrl_of(instr);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_program(input int cycles);
    isa_model m = new(IW, DW);
    effect_t  e;
    logic [31:0] prog [] = new[IW];
    put_prologue(prog, DW);
    for (int i = 6; i < IW; i++) prog[i] = rand_instr(i, 6, IW - 1);
    rst = 1;
    foreach (prog[i]) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = 32'(i * 4); imem_wdata = prog[i]; m.imem[i] = prog[i];
    end
    @(negedge clk); imem_we = 0;
    @(negedge clk); rst = 0;
    for (int n = 0; n < cycles; n++) begin
      logic [31:0] mpc = m.pc, mins = m.fetch();
      e = m.step();
      kinds[e.kind]++;
      checks++;
      if (pc !== mpc || instr !== mins) begin
        failures++; $display("FAIL fetch pc=%h exp %h instr=%h exp %h", pc, mpc, instr, mins);
      end
      if (ctrl.reg_wr) begin
        checks++;
        if (rw !== e.reg_waddr || busw !== e.reg_wdata) begin
          failures++; $display("FAIL pc=%h reg write r%0d=%h exp r%0d=%h", pc, rw, busw, e.reg_waddr, e.reg_wdata);
        end
      end
      if (ctrl.mem_wr || e.kind == K_LW) begin
        checks++;
        if (alu_out !== e.mem_addr || (ctrl.mem_wr && busb !== e.mem_wdata)) begin
          failures++; $display("FAIL pc=%h mem addr=%h data=%h exp %h %h", pc, alu_out, busb, e.mem_addr, e.mem_wdata);
        end
      end
      @(negedge clk);
      if (failures > 20) break;
    end
    checks++;
    if (pc !== m.pc) begin failures++; $display("FAIL final pc=%h exp %h", pc, m.pc); end
  endtask

  initial begin
    rst = 1; imem_we = 0; imem_waddr = 0; imem_wdata = 0;
    for (int p = 0; p < 6; p++) run_program(2500);
    foreach (kinds[k]) if (k != K_OTHER) begin
      checks++;
      if (kinds[k] == 0) begin failures++; $display("FAIL instruction kind %0d never ran", k); end
    end
    $display("add=%0d sub=%0d ori=%0d lw=%0d sw=%0d beq_taken=%0d beq_not=%0d j=%0d",
             kinds[K_ADD], kinds[K_SUB], kinds[K_ORI], kinds[K_LW], kinds[K_SW],
             kinds[K_BEQ_T], kinds[K_BEQ_N], kinds[K_J]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
