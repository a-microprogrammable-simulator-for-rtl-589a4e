// Self-checking test of the program counter: increment with carry across
// bytes, byte loads, load-over-increment priority, reset.
module tb_program_counter;
  logic clk = 0, rst, inc, ld_hi, ld_lo; logic [7:0] bus; logic [15:0] q; int model;
  int checks = 0, failures = 0;
  program_counter dut (.clk, .rst, .inc, .ld_hi, .ld_lo, .bus, .q);
  always #5 clk = ~clk;
  initial begin
    rst = 1; inc = 1; ld_hi = 0; ld_lo = 0; bus = 0; @(posedge clk); #1; rst = 0;
    checks++; if (q !== 0) begin failures++; $display("FAIL reset"); end
    model = 0;
    // walk over a byte boundary
    ld_hi = 1; ld_lo = 0; inc = 0; bus = 8'h12; @(posedge clk); #1;
    ld_hi = 0; ld_lo = 1; bus = 8'hFE; @(posedge clk); #1; model = 16'h12FE;
    checks++; if (q !== 16'(model)) begin failures++; $display("FAIL load %h", q); end
    ld_lo = 0; inc = 1;
    repeat (3) begin @(posedge clk); #1; model = (model + 1) & 16'hFFFF;
      checks++; if (q !== 16'(model)) begin failures++; $display("FAIL inc %h exp %h", q, model); end end
    for (int i = 0; i < 300; i++) begin
      logic [15:0] nx;
      inc = 1'($urandom); ld_hi = ($urandom_range(0, 3) == 0); ld_lo = ($urandom_range(0, 3) == 0); bus = 8'($urandom);
      @(posedge clk); #1;
      nx = inc ? 16'(model + 1) : 16'(model);
      if (ld_hi) nx = {bus, nx[7:0]};
      if (ld_lo) nx = {nx[15:8], bus};
      model = nx;
      checks++; if (q !== 16'(model)) begin failures++; $display("FAIL q=%h exp=%h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
