// tb_inst_memory: self-checking test of the instruction memory.
// Loads every word through the load port, then reads each back at its byte
// address (Instruction = MEM[PC]) and compares with the value written. Also
// checks that a load lands only at the clock edge.
module tb_inst_memory;
  localparam int WORDS = 256;
  logic        clk = 0, we;
  logic [31:0] addr, instr, waddr, wdata;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  inst_memory #(.WORDS(WORDS)) dut (.clk, .addr, .instr, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      we = 1; waddr = 32'(i * 4); wdata = $urandom;
      @(posedge clk);
      model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 3; n++)
      for (int i = 0; i < WORDS; i++) begin
        int k;
        k = (n == 2) ? WORDS - 1 - i : i;
        addr = 32'(k * 4); #1;
        checks++;
        if (instr !== model[k]) begin
          failures++; $display("FAIL word %0d got %h exp %h", k, instr, model[k]);
        end
      end
    // overwrite one word: old value until the edge, new after
    @(negedge clk);
    we = 1; waddr = 32'h40; wdata = ~model[16]; addr = 32'h40; #1;
    checks++;
    if (instr !== model[16]) begin failures++; $display("FAIL load visible before edge"); end
    @(posedge clk); #1;
    checks++;
    if (instr !== ~model[16]) begin failures++; $display("FAIL load not written"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
