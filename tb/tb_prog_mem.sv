// Self-checking test of the 64K x 8 program memory at full size: loader
// writes, CPU writes, asynchronous reads, loader priority, top and bottom
// addresses.
module tb_prog_mem;
  logic clk = 0, we, ld_we; logic [15:0] addr, ld_addr; logic [7:0] wdata, rdata, ld_data;
  logic [7:0] model [int];
  int checks = 0, failures = 0;
  prog_mem dut (.clk, .addr, .we, .wdata, .rdata, .ld_we, .ld_addr, .ld_data);
  always #5 clk = ~clk;
  initial begin
    we = 0; ld_we = 0; addr = 0; ld_addr = 0; wdata = 0; ld_data = 0;
    for (int i = 0; i < 300; i++) begin
      ld_we = 1; ld_addr = (i == 0) ? 16'h0000 : (i == 1) ? 16'hFFFF : 16'($urandom); ld_data = 8'($urandom);
      @(posedge clk); #1; model[int'(ld_addr)] = ld_data;
    end
    ld_we = 0;
    for (int i = 0; i < 300; i++) begin
      we = 1'($urandom); addr = 16'($urandom); wdata = 8'($urandom);
      if (we) begin @(posedge clk); #1; model[int'(addr)] = wdata; end
    end
    we = 0;
    // loader wins over the CPU port
    ld_we = 1; we = 1; ld_addr = 16'h1234; addr = 16'h1234; ld_data = 8'hA5; wdata = 8'h5A;
    @(posedge clk); #1; model[16'h1234] = 8'hA5; ld_we = 0; we = 0;
    foreach (model[k]) begin
      addr = 16'(k); #1;
      checks++; if (rdata !== model[k]) begin failures++; $display("FAIL addr=%h got %h exp %h", addr, rdata, model[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
