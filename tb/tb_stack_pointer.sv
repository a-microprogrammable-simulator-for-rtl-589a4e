// Self-checking test of the stack pointer: byte loads and hold.
module tb_stack_pointer;
  logic clk = 0, rst, ld_hi, ld_lo; logic [7:0] bus; logic [15:0] q, model;
  int checks = 0, failures = 0;
  stack_pointer dut (.clk, .rst, .ld_hi, .ld_lo, .bus, .q);
  always #5 clk = ~clk;
  initial begin
    rst = 1; ld_hi = 1; ld_lo = 1; bus = 8'h55; @(posedge clk); #1; rst = 0;
    checks++; if (q !== 0) begin failures++; $display("FAIL reset"); end
    model = 0;
    for (int i = 0; i < 300; i++) begin
      ld_hi = 1'($urandom); ld_lo = 1'($urandom); bus = 8'($urandom);
      @(posedge clk); #1;
      if (ld_hi) model[15:8] = bus;
      if (ld_lo) model[7:0] = bus;
      checks++; if (q !== model) begin failures++; $display("FAIL q=%h exp=%h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
