// Self-checking test of the flag register: reset, load, hold.
module tb_flag_reg;
  import mpsim_pkg::*;
  logic clk = 0, rst, we; flags_t d, q, model;
  int checks = 0, failures = 0;
  flag_reg dut (.clk, .rst, .we, .d, .q);
  always #5 clk = ~clk;
  initial begin
    rst = 1; we = 0; d = '0; @(posedge clk); #1; rst = 0;
    checks++; if (q !== 4'b0) begin failures++; $display("FAIL reset"); end
    model = '0;
    for (int i = 0; i < 200; i++) begin
      we = 1'($urandom); d = flags_t'($urandom);
      @(posedge clk); #1;
      if (we) model = d;
      checks++; if (q !== model) begin failures++; $display("FAIL q=%b exp=%b", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (1000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
