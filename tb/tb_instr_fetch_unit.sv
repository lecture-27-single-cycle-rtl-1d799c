// tb_instr_fetch_unit: self-checking test of the fetch unit.
// The instruction memory is loaded with random words whose opcode field does
// not matter here; nPC_sel, Zero and Jump are then driven at random each
// cycle. A model in the testbench keeps its own PC and copy of the memory and
// predicts the fetched instruction and the next PC (PC+4, branch target
// PC+4+SignExt(imm16)*4, or jump target {PC[31:28], target, 00}). Every PC
// change must take exactly one clock. Counts how often each next-PC case
// happened and fails if one never did.
module tb_instr_fetch_unit;
  localparam int WORDS = 256;
  logic        clk = 0, rst, npc_sel, zero, jump, imem_we;
  logic [31:0] imem_waddr, imem_wdata, pc, instr;
  logic [31:0] mem [WORDS];
  logic [31:0] mpc, exp_next;
  int checks = 0, failures = 0;
  int n_seq = 0, n_br_taken = 0, n_br_not = 0, n_jump = 0;

  instr_fetch_unit #(.IMEM_WORDS(WORDS)) dut (
    .clk, .rst, .npc_sel, .zero, .jump, .imem_we, .imem_waddr, .imem_wdata, .pc, .instr);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; npc_sel = 0; zero = 0; jump = 0; imem_we = 0; imem_waddr = 0; imem_wdata = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = 32'(i * 4); imem_wdata = $urandom; mem[i] = imem_wdata;
    end
    @(negedge clk); imem_we = 0;
    @(negedge clk); rst = 0;
    mpc = 0;
    for (int n = 0; n < 2000; n++) begin
      npc_sel = 1'($urandom); zero = 1'($urandom); jump = ($urandom % 5) == 0;
      #1;
      checks++;
      if (pc !== mpc || instr !== mem[mpc[9:2]]) begin
        failures++; $display("FAIL cycle %0d pc=%h exp %h instr=%h", n, pc, mpc, instr);
      end
      if (jump) begin
        exp_next = {mpc[31:28], mem[mpc[9:2]][25:0], 2'b00}; n_jump++;
      end else if (npc_sel && zero) begin
        exp_next = mpc + 32'd4 + (32'(int'($signed(mem[mpc[9:2]][15:0]))) << 2); n_br_taken++;
      end else begin
        exp_next = mpc + 32'd4;
        if (npc_sel) n_br_not++; else n_seq++;
      end
      @(posedge clk);
      mpc = exp_next;
      @(negedge clk);
    end
    checks++; if (n_seq == 0)      begin failures++; $display("FAIL no sequential step"); end
    checks++; if (n_br_taken == 0) begin failures++; $display("FAIL no taken branch"); end
    checks++; if (n_br_not == 0)   begin failures++; $display("FAIL no untaken branch"); end
    checks++; if (n_jump == 0)     begin failures++; $display("FAIL no jump"); end
    // reset returns the PC to 0 in one edge
    rst = 1; @(posedge clk); #1;
    checks++; if (pc !== 32'd0) begin failures++; $display("FAIL reset pc=%h", pc); end
    $display("seq=%0d br_taken=%0d br_not_taken=%0d jump=%0d", n_seq, n_br_taken, n_br_not, n_jump);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
