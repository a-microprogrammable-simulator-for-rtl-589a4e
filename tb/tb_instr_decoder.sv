// Self-checking test of the instruction decoder. Loads a table the way the
// decoder file of the example machine describes it (nop -> 0, mov 01DDDSSS
// -> 4, add 10000SSS -> 2, mpy 00100SSS -> 6, 11111111 -> 0, everything else
// 0x1FF), expanding the don't-care bits here, then checks all 256 op codes.
module tb_instr_decoder;
  logic clk = 0, we; logic [7:0] waddr, opcode; logic [8:0] wdata, start_addr;
  int checks = 0, failures = 0;
  instr_decoder dut (.clk, .we, .waddr, .wdata, .opcode, .start_addr);
  always #5 clk = ~clk;
  function automatic logic [8:0] expect_addr(input logic [7:0] op);
    if (op == 8'h00 || op == 8'hFF) return 9'd0;
    if (op[7:6] == 2'b01)           return 9'd4;
    if (op[7:3] == 5'b10000)        return 9'd2;
    if (op[7:3] == 5'b00100)        return 9'd6;
    return 9'h1FF;
  endfunction
  initial begin
    we = 1; opcode = 0;
    for (int i = 0; i < 256; i++) begin waddr = 8'(i); wdata = expect_addr(8'(i)); @(posedge clk); #1; end
    we = 0;
    for (int i = 0; i < 256; i++) begin
      opcode = 8'(i); #1;
      checks++; if (start_addr !== expect_addr(8'(i))) begin failures++; $display("FAIL op=%h got %0d", i, start_addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (3000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
