// tb_mux2: self-checking test of the two-input multiplexer at widths 5 and 32.
// Random inputs on both data ports; the expected output is worked out from the
// select value in the testbench. A watchdog ends the run if it hangs.
module tb_mux2;
  logic        sel;
  logic [31:0] d0, d1, y;
  logic [4:0]  e0, e1, ey;
  int checks = 0, failures = 0;

  mux2 #(.WIDTH(32)) dut32 (.sel(sel), .d0(d0), .d1(d1), .y(y));
  mux2 #(.WIDTH(5))  dut5  (.sel(sel), .d0(e0), .d1(e1), .y(ey));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      sel = i[0];
      d0 = $urandom; d1 = $urandom; e0 = 5'($urandom); e1 = 5'($urandom);
      #1;
      checks++;
      if (y !== (i[0] ? d1 : d0)) begin
        failures++; $display("FAIL 32-bit sel=%0d y=%h", sel, y);
      end
      checks++;
      if (ey !== (i[0] ? e1 : e0)) begin
        failures++; $display("FAIL 5-bit sel=%0d y=%h", sel, ey);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
