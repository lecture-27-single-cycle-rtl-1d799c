// tb_alu: self-checking test of the ALU.
// ADD, SUB and OR on random and corner operands, the unused code 11, and the
// Zero flag (equal operands under SUB, as beq uses it). Expected values come
// from the testbench's own arithmetic.
module tb_alu;
  import cpu_pkg::*;
  alu_ctr_t    ctr;
  logic [31:0] a, b, r;
  logic        z;
  int checks = 0, failures = 0;
  int nzero = 0;

  alu #(.WIDTH(32)) dut (.alu_ctr(ctr), .a(a), .b(b), .result(r), .zero(z));

  task automatic check(input logic [1:0] c, input logic [31:0] x, input logic [31:0] y);
    logic [31:0] exp;
    ctr = alu_ctr_t'(c); a = x; b = y; #1;
    case (c)
      2'b00:   exp = x + y;
      2'b01:   exp = x + ~y + 32'd1;
      2'b10:   exp = x | y;
      default: exp = 32'd0;
    endcase
    checks++;
    if (r !== exp || z !== (exp == 32'd0)) begin
      failures++;
      $display("FAIL ctr=%0b a=%h b=%h got %h/%0b exp %h", c, x, y, r, z, exp);
    end
    if (exp == 32'd0) nzero++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    check(2'b00, 32'hffff_ffff, 32'd1);      // wraps to 0, Zero = 1
    check(2'b01, 32'd5, 32'd7);              // negative result
    check(2'b10, 32'h0f0f_0000, 32'h0000_f0f0);
    check(2'b10, 32'd0, 32'd0);
    check(2'b11, 32'h1234_5678, 32'h1);
    for (int i = 0; i < 300; i++) begin
      v = $urandom;
      check(2'($urandom % 3), $urandom, $urandom);
      check(2'b01, v, v);                    // equal operands: Zero = 1
      check(2'b01, v, v ^ (32'd1 << (i % 32))); // differ in one bit: Zero = 0
    end
    checks++;
    if (nzero < 300) begin
      failures++; $display("FAIL Zero was set only %0d times", nzero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
