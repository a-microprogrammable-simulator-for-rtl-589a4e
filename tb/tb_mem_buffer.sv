// Self-checking test of the memory buffer register: read pass-through and
// capture, write drive and capture, held value, both enables off.
module tb_mem_buffer;
  logic clk = 0, rst, out_en, in_en, rd; logic [7:0] int_bus, ext_bus, to_int, to_ext, model;
  int checks = 0, failures = 0;
  mem_buffer dut (.clk, .rst, .out_en, .in_en, .rd, .int_bus, .ext_bus, .to_int, .to_ext);
  always #5 clk = ~clk;
  initial begin
    rst = 1; out_en = 0; in_en = 0; rd = 0; int_bus = 0; ext_bus = 0; @(posedge clk); #1; rst = 0;
    model = 0;
    for (int i = 0; i < 500; i++) begin
      out_en = 1'($urandom); in_en = 1'($urandom); rd = 1'($urandom);
      int_bus = 8'($urandom); ext_bus = 8'($urandom);
      #1;
      checks++;
      if (to_int !== (in_en ? (rd ? ext_bus : model) : 8'h00)) begin failures++; $display("FAIL to_int"); end
      checks++;
      if (to_ext !== (out_en ? int_bus : model)) begin failures++; $display("FAIL to_ext"); end
      @(posedge clk); #1;
      if (rd) model = ext_bus; else if (out_en) model = int_bus;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
