// tb_extender: self-checking test of the immediate extender.
// Checks zero- and sign-extension of the boundary values and of random
// immediates against arithmetic worked out in the testbench.
module tb_extender;
  logic        ext_op;
  logic [15:0] imm16;
  logic [31:0] imm32;
  int checks = 0, failures = 0;

  extender dut (.ext_op(ext_op), .imm16(imm16), .imm32(imm32));

  task automatic check(input logic op, input logic [15:0] v);
    logic [31:0] exp;
    ext_op = op; imm16 = v; #1;
    exp = op ? 32'(int'($signed(v))) : 32'(v);
    checks++;
    if (imm32 !== exp) begin
      failures++; $display("FAIL ext_op=%0d imm16=%h got %h exp %h", op, v, imm32, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(1'b0, 16'hffff); check(1'b1, 16'hffff);
    check(1'b0, 16'h8000); check(1'b1, 16'h8000);
    check(1'b0, 16'h7fff); check(1'b1, 16'h7fff);
    check(1'b1, 16'h0000);
    for (int i = 0; i < 200; i++) check(1'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
