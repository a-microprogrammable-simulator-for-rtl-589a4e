// Self-checking test of the 512 x 31 control store: every word written with
// a different pattern, then every word read back asynchronously.
module tb_control_store;
  logic clk = 0, we; logic [8:0] waddr, raddr; logic [30:0] wdata, word;
  int checks = 0, failures = 0;
  control_store dut (.clk, .we, .waddr, .wdata, .raddr, .word);
  always #5 clk = ~clk;
  function automatic logic [30:0] pat(input int i);
    return 31'((i * 32'h9E3779B1) ^ (i << 20));
  endfunction
  initial begin
    we = 1; raddr = 0;
    for (int i = 0; i < 512; i++) begin waddr = 9'(i); wdata = pat(i); @(posedge clk); #1; end
    we = 0;
    for (int i = 511; i >= 0; i--) begin
      raddr = 9'(i); #1;
      checks++; if (word !== pat(i)) begin failures++; $display("FAIL %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (3000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
