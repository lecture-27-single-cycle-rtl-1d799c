// tb_regfile: self-checking test of the 32 x 32-bit register file.
// A shadow array in the testbench models the registers. Random writes and
// reads on both ports are compared with it; the test also checks that
// register 0 stays zero, that a write appears only after the clock edge and
// that reset clears every register.
module tb_regfile;
  logic        clk = 0, rst, we;
  logic [4:0]  rw, ra, rb;
  logic [31:0] busw, busa, busb;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile #(.NREGS(32), .WIDTH(32)) dut (.clk, .rst, .we, .rw, .ra, .rb, .busw, .busa, .busb);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(input logic [4:0] x, input logic [4:0] y);
    ra = x; rb = y; #1;
    checks++;
    if (busa !== model[x] || busb !== model[y]) begin
      failures++;
      $display("FAIL read ra=%0d rb=%0d got %h %h exp %h %h", x, y, busa, busb, model[x], model[y]);
    end
  endtask

  initial begin
    rst = 1; we = 0; rw = 0; ra = 0; rb = 0; busw = 0;
    foreach (model[i]) model[i] = 32'd0;
    @(posedge clk); @(negedge clk);
    rst = 0;
    for (int i = 0; i < 32; i++) read_check(5'(i), 5'(31 - i));
    // fill every register, including an attempt on register 0
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      we = 1; rw = 5'(i); busw = $urandom | 32'h1;
      ra = 5'(i); rb = 5'(i); #1;
      checks++;                      // before the edge the old value is read
      if (busa !== model[i]) begin
        failures++; $display("FAIL write visible before edge r%0d", i);
      end
      @(posedge clk);
      if (i != 0) model[i] = busw;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 32; i++) read_check(5'(i), 5'($urandom));
    // random traffic
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = 1'($urandom); rw = 5'($urandom); busw = $urandom;
      read_check(5'($urandom), 5'($urandom));
      @(posedge clk);
      if (we && rw != 0) model[rw] = busw;
    end
    // reset clears everything
    @(negedge clk); we = 0; rst = 1;
    @(posedge clk); @(negedge clk); rst = 0;
    foreach (model[i]) model[i] = 32'd0;
    for (int i = 0; i < 32; i++) read_check(5'(i), 5'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
