// Self-checking test of the 3:8 register decoder: every code, enabled and not.
module tb_reg_decoder;
  logic en; logic [2:0] code; logic [7:0] sel;
  int checks = 0, failures = 0;
  reg_decoder dut (.en, .code, .sel);
  initial begin
    for (int e = 0; e < 2; e++)
      for (int c = 0; c < 8; c++) begin
        en = 1'(e); code = 3'(c); #1;
        checks++;
        if (sel !== (e ? (8'd1 << c) : 8'd0)) begin failures++; $display("FAIL en=%0d code=%0d sel=%b", e, c, sel); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
