// tb_single_cycle_cpu: end-to-end test of the processor at its default sizes.
//
// Loads programs through the instruction-memory port while reset is held,
// then lets the processor run, comparing every cycle with the instruction-level
// reference model of tb_isa_pkg: the PC and instruction, the register write
// (RegWr, Rw, busW) and the memory write (MemWr, address, Data In). The model
// also predicts the next PC, so every instruction must finish in one clock.
//
// Program 1 is a complete computation: clear data memory, fill an array of
// ten words with 1, 2, 4, ... 512, sum it with a load/add/beq/j loop, store
// the sum (1023) at the last data word, then spin on a jump to itself. The
// sum's store is checked by value. Programs 2 onwards are random instruction
// mixes after the same memory-clearing loop. The test counts each
// instruction kind, taken and untaken branches, backward branches, writes
// aimed at register 0 and negative (sign-extended) load/store offsets, and
// fails if any of them never happened.
module tb_single_cycle_cpu;
  import tb_isa_pkg::*;

  localparam int IW = 256, DW = 256;   // the processor's default memory sizes
  logic        clk = 0, rst, imem_we;
  logic [31:0] imem_waddr, imem_wdata, pc, instr, reg_wdata, mem_addr, mem_wdata;
  logic        reg_we, mem_we;
  logic [4:0]  reg_waddr;
  int checks = 0, failures = 0;
  int kinds [K_N] = '{default: 0};
  int n_r0_write = 0, n_back_branch = 0, n_neg_offset = 0, n_sum_ok = 0, n_halt = 0;

  single_cycle_cpu dut (
    .clk, .rst, .imem_we, .imem_waddr, .imem_wdata, .pc, .instr,
    .reg_we, .reg_waddr, .reg_wdata, .mem_we, .mem_addr, .mem_wdata);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Directed program: array fill, sum, store, halt.
  function automatic void put_sum_program(ref logic [31:0] p []);
    put_prologue(p, DW);                       // words 0..5, r4 = 4
    p[6]  = enc_i(6'h0d, 0, 2, 0);             // r2 = 0        (address)
    p[7]  = enc_i(6'h0d, 0, 3, 40);            // r3 = 40       (end address)
    p[8]  = enc_i(6'h0d, 0, 5, 1);             // r5 = 1        (value)
    p[9]  = enc_i(6'h2b, 2, 5, 0);             // fill: sw r5,0(r2)
    p[10] = enc_r(5, 5, 5, 6'h20);             // r5 = r5 + r5
    p[11] = enc_r(2, 4, 2, 6'h20);             // r2 = r2 + 4
    p[12] = enc_i(6'h04, 2, 3, 1);             // beq r2,r3 -> 14
    p[13] = enc_j(9);                          // j fill
    p[14] = enc_i(6'h0d, 0, 6, 0);             // r6 = 0        (sum)
    p[15] = enc_i(6'h23, 2, 7, -4);            // loop: lw r7,-4(r2)
    p[16] = enc_r(6, 7, 6, 6'h20);             // r6 = r6 + r7
    p[17] = enc_r(2, 4, 2, 6'h22);             // r2 = r2 - 4
    p[18] = enc_i(6'h04, 2, 0, 1);             // beq r2,r0 -> 20 (done)
    p[19] = enc_i(6'h04, 0, 0, -5);            // beq r0,r0 -> 15 (backward, always taken)
    p[20] = enc_i(6'h2b, 0, 6, 4 * DW - 4);    // sw r6, last word
    p[21] = enc_r(6, 6, 0, 6'h20);             // add r0,r6,r6 (write to r0 is dropped)
    p[22] = enc_j(22);                         // halt: j self
    for (int i = 23; i < IW; i++) p[i] = 32'd0;
  endfunction

  task automatic run_program(input bit directed, input int cycles);
    isa_model m = new(IW, DW);
    effect_t  e;
    logic [31:0] prog [] = new[IW];
    if (directed) put_sum_program(prog);
    else begin
      put_prologue(prog, DW);
      for (int i = 6; i < IW; i++) prog[i] = rand_instr(i, 6, IW - 1);
    end
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
      if (e.kind == K_BEQ_T && mins[15]) n_back_branch++;
      if ((e.kind == K_LW || e.kind == K_SW) && mins[15]) n_neg_offset++;
      if (e.reg_we && e.reg_waddr == 5'd0) n_r0_write++;
      if (directed && mpc == 32'(20 * 4)) begin
        checks++;
        if (mem_we && mem_addr == 32'(4 * DW - 4) && mem_wdata == 32'd1023) n_sum_ok++;
        else begin failures++; $display("FAIL sum stored %h", mem_wdata); end
      end
      if (directed && e.kind == K_J && e.next_pc == mpc) n_halt++;
      checks++;
      if (pc !== mpc || instr !== mins) begin
        failures++; $display("FAIL fetch pc=%h exp %h instr=%h exp %h", pc, mpc, instr, mins);
      end
      checks++;
      if (reg_we !== e.reg_we || mem_we !== e.mem_we) begin
        failures++; $display("FAIL pc=%h RegWr=%0b MemWr=%0b exp %0b %0b", pc, reg_we, mem_we, e.reg_we, e.mem_we);
      end
      if (e.reg_we) begin
        checks++;
        if (reg_waddr !== e.reg_waddr || reg_wdata !== e.reg_wdata) begin
          failures++; $display("FAIL pc=%h reg write r%0d=%h exp r%0d=%h", pc, reg_waddr, reg_wdata, e.reg_waddr, e.reg_wdata);
        end
      end
      if (e.mem_we) begin
        checks++;
        if (mem_addr !== e.mem_addr || mem_wdata !== e.mem_wdata) begin
          failures++; $display("FAIL pc=%h mem write [%h]=%h exp [%h]=%h", pc, mem_addr, mem_wdata, e.mem_addr, e.mem_wdata);
        end
      end
      @(negedge clk);
      if (failures > 20) break;
    end
  endtask

  initial begin
    rst = 1; imem_we = 0; imem_waddr = 0; imem_wdata = 0;
    run_program(1'b1, 1400);
    checks++;
    if (n_sum_ok != 1 || n_halt == 0) begin
      failures++; $display("FAIL directed program: sum stores=%0d halt cycles=%0d", n_sum_ok, n_halt);
    end
    for (int p = 0; p < 8; p++) run_program(1'b0, 2500);
    foreach (kinds[k]) if (k != K_OTHER) begin
      checks++;
      if (kinds[k] == 0) begin failures++; $display("FAIL instruction kind %0d never ran", k); end
    end
    checks++; if (n_back_branch == 0) begin failures++; $display("FAIL no backward branch"); end
    checks++; if (n_neg_offset == 0)  begin failures++; $display("FAIL no negative offset"); end
    checks++; if (n_r0_write == 0)    begin failures++; $display("FAIL no write to r0"); end
    $display("add=%0d sub=%0d ori=%0d lw=%0d sw=%0d beq_taken=%0d beq_not_taken=%0d j=%0d",
             kinds[K_ADD], kinds[K_SUB], kinds[K_ORI], kinds[K_LW], kinds[K_SW],
             kinds[K_BEQ_T], kinds[K_BEQ_N], kinds[K_J]);
    $display("backward_branches=%0d negative_offsets=%0d r0_writes=%0d sum_ok=%0d halt_cycles=%0d",
             n_back_branch, n_neg_offset, n_r0_write, n_sum_ok, n_halt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
