// Self-checking test of the microprogram counter logic: increment, load,
// hold, every condition-multiplexer input, reset > load > increment.
module tb_upc_logic;
  import mpsim_pkg::*;
  logic clk = 0, rst, inc, load, reset_taken; logic [2:0] cond_sel; logic [8:0] load_addr, upc, model;
  flags_t flags; logic exp_rt;
  int checks = 0, failures = 0;
  upc_logic dut (.clk, .rst, .inc, .load, .cond_sel, .load_addr, .flags, .upc, .reset_taken);
  always #5 clk = ~clk;
  initial begin
    rst = 1; inc = 0; load = 0; cond_sel = 0; load_addr = 0; flags = '0;
    @(posedge clk); #1; rst = 0;
    checks++; if (upc !== 0) begin failures++; $display("FAIL reset"); end
    model = 0;
    for (int i = 0; i < 2000; i++) begin
      inc = 1'($urandom); load = ($urandom_range(0, 3) == 0); cond_sel = 3'($urandom);
      if ($urandom_range(0, 1)) cond_sel = 3'd0;
      load_addr = 9'($urandom); flags = flags_t'($urandom);
      #1;
      case (cond_sel)
        0: exp_rt = 0; 1: exp_rt = 1; 2: exp_rt = flags.c; 3: exp_rt = flags.z;
        4: exp_rt = flags.s; 5: exp_rt = flags.p; default: exp_rt = 0;
      endcase
      checks++; if (reset_taken !== exp_rt) begin failures++; $display("FAIL cond %0d", cond_sel); end
      @(posedge clk); #1;
      if (exp_rt) model = 0; else if (load) model = load_addr; else if (inc) model = 9'(model + 1);
      checks++; if (upc !== model) begin failures++; $display("FAIL upc=%0d exp=%0d", upc, model); end
    end
    // wrap-around of the 9-bit counter
    load = 1; inc = 0; cond_sel = 0; load_addr = 9'h1FF; @(posedge clk); #1;
    load = 0; inc = 1; @(posedge clk); #1;
    checks++; if (upc !== 0) begin failures++; $display("FAIL wrap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
