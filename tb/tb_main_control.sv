// tb_main_control: self-checking test of the controller.
// The expected control word of each of the seven instructions is written out
// below as a table, row by row (don't-care entries taken as 0). Every
// combination of op and func is then applied: the seven instructions must
// produce their row and every other code must turn all control points off.
module tb_main_control;
  import cpu_pkg::*;
  logic [5:0] op, func;
  ctrl_t      ctrl;
  int checks = 0, failures = 0;

  main_control dut (.op(op), .func(func), .ctrl(ctrl));

  // RegDst ALUSrc MemtoReg RegWr MemWr nPC_sel Jump ExtOp ALUctr
  localparam logic [10:0] ROW_ADD  = 11'b1_0_0_1_0_0_0_0_00;
  localparam logic [10:0] ROW_SUB  = 11'b1_0_0_1_0_0_0_0_01;
  localparam logic [10:0] ROW_ORI  = 11'b0_1_0_1_0_0_0_0_10;
  localparam logic [10:0] ROW_LW   = 11'b0_1_1_1_0_0_0_1_00;
  localparam logic [10:0] ROW_SW   = 11'b0_1_0_0_1_0_0_1_00;
  localparam logic [10:0] ROW_BEQ  = 11'b0_0_0_0_0_1_0_0_01;
  localparam logic [10:0] ROW_JUMP = 11'b0_0_0_0_0_0_1_0_00;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [10:0] exp;
    int hits[7] = '{default: 0};
    for (int o = 0; o < 64; o++)
      for (int f = 0; f < 64; f++) begin
        op = 6'(o); func = 6'(f); #1;
        exp = 11'd0;
        if (o == 0 && f == 'h20) begin exp = ROW_ADD;  hits[0]++; end
        if (o == 0 && f == 'h22) begin exp = ROW_SUB;  hits[1]++; end
        if (o == 'h0d)           begin exp = ROW_ORI;  hits[2]++; end
        if (o == 'h23)           begin exp = ROW_LW;   hits[3]++; end
        if (o == 'h2b)           begin exp = ROW_SW;   hits[4]++; end
        if (o == 'h04)           begin exp = ROW_BEQ;  hits[5]++; end
        if (o == 'h02)           begin exp = ROW_JUMP; hits[6]++; end
        checks++;
        if (11'(ctrl) !== exp) begin
          failures++;
          $display("FAIL op=%b func=%b got %b exp %b", op, func, 11'(ctrl), exp);
        end
      end
    foreach (hits[i]) begin
      checks++;
      if (hits[i] == 0) begin failures++; $display("FAIL row %0d never applied", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
