// Self-checking test of the BCD to 7-segment decoder: every code against
// the segment list of each digit (a..g = bit 0..6), blanks above 9.
module tb_bcd_7seg;
  logic [3:0] bcd; logic [6:0] seg;
  int checks = 0, failures = 0;
  bcd_7seg dut (.bcd, .seg);
  // segments lit for each digit, as letters
  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};
  initial begin
    for (int d = 0; d < 16; d++) begin
      logic [6:0] e; e = 0;
      if (d < 10) for (int k = 0; k < lit[d].len(); k++) e[lit[d][k] - "a"] = 1'b1;
      bcd = 4'(d); #1;
      checks++; if (seg !== e) begin failures++; $display("FAIL %0d: %b exp %b", d, seg, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
