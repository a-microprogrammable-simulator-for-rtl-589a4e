// Self-checking test of the 8-bit bus register (T): reset, load, hold.
module tb_byte_reg;
  logic clk = 0, rst, load; logic [7:0] d, q, model;
  int checks = 0, failures = 0;
  byte_reg dut (.clk, .rst, .load, .d, .q);
  always #5 clk = ~clk;
  initial begin
    rst = 1; load = 1; d = 8'hAA; @(posedge clk); #1; rst = 0;
    checks++; if (q !== 8'h00) begin failures++; $display("FAIL reset"); end
    model = 0;
    for (int i = 0; i < 200; i++) begin
      load = 1'($urandom); d = 8'($urandom);
      @(posedge clk); #1;
      if (load) model = d;
      checks++; if (q !== model) begin failures++; $display("FAIL q=%h exp=%h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (1000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
