// Self-checking test of the MAR and its 4:1 source multiplexer:
// code 0 zero, 1 PC, 2 SP, 3 H:L; load and hold.
module tb_mar_unit;
  logic clk = 0, rst, load; logic [1:0] sel; logic [15:0] pc, sp, hl, mar, model;
  int checks = 0, failures = 0;
  mar_unit dut (.clk, .rst, .sel, .load, .pc, .sp, .hl, .mar);
  always #5 clk = ~clk;
  initial begin
    rst = 1; load = 1; sel = 1; pc = 16'hFFFF; sp = 0; hl = 0; @(posedge clk); #1; rst = 0;
    checks++; if (mar !== 0) begin failures++; $display("FAIL reset"); end
    model = 0;
    for (int i = 0; i < 400; i++) begin
      load = 1'($urandom); sel = 2'($urandom); pc = 16'($urandom); sp = 16'($urandom); hl = 16'($urandom);
      @(posedge clk); #1;
      if (load) model = (sel == 1) ? pc : (sel == 2) ? sp : (sel == 3) ? hl : 16'h0000;
      checks++; if (mar !== model) begin failures++; $display("FAIL sel=%0d mar=%h exp=%h", sel, mar, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
