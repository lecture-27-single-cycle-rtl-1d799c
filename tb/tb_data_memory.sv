// tb_data_memory: self-checking test of the data memory.
// Random word writes and combinational reads are compared with a shadow
// array; the test also checks that a write lands only at the clock edge and
// only when WrEn is 1, and that the two low address bits are ignored.
module tb_data_memory;
  localparam int WORDS = 256;
  logic        clk = 0, wr_en;
  logic [31:0] adr, data_in, data_out;
  logic [31:0] model [WORDS];
  bit          valid [WORDS];
  int checks = 0, failures = 0;

  data_memory #(.WORDS(WORDS)) dut (.clk, .wr_en, .adr, .data_in, .data_out);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; adr = 0; data_in = 0;
    // write every word once
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      wr_en = 1; adr = 32'(i * 4); data_in = $urandom;
      @(posedge clk);
      model[i] = data_in; valid[i] = 1;
    end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < WORDS; i++) begin
      adr = 32'(i * 4) | 32'($urandom % 4); #1;
      checks++;
      if (data_out !== model[i]) begin
        failures++; $display("FAIL word %0d got %h exp %h", i, data_out, model[i]);
      end
    end
    // random traffic; a write is visible only after the edge
    for (int n = 0; n < 1000; n++) begin
      int w;
      @(negedge clk);
      w = $urandom % WORDS;
      wr_en = 1'($urandom); adr = 32'(w * 4); data_in = $urandom; #1;
      checks++;
      if (data_out !== model[w]) begin
        failures++; $display("FAIL read before edge word %0d", w);
      end
      @(posedge clk);
      if (wr_en) model[w] = data_in;
      #1;
      checks++;
      if (data_out !== model[w]) begin
        failures++; $display("FAIL read after edge word %0d got %h exp %h", w, data_out, model[w]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
