// Self-checking test of the A/B/C/D/E/H/L register file: random one-hot bus
// writes, ALU writes to A, reads through the read decoder, H:L pair, and
// that code 6 neither stores nor drives anything.
module tb_gp_regfile;
  logic clk = 0, rst, alu_we;
  logic [7:0] wr_sel, rd_sel, bus, alu_y, rd_data, a;
  logic [15:0] hl;
  logic [7:0] model [8];
  int checks = 0, failures = 0;
  gp_regfile dut (.clk, .rst, .wr_sel, .rd_sel, .bus, .alu_we, .alu_y, .rd_data, .a, .hl);
  always #5 clk = ~clk;
  initial begin
    rst = 1; wr_sel = 0; rd_sel = 0; bus = 0; alu_we = 0; alu_y = 0;
    @(posedge clk); #1; rst = 0;
    foreach (model[i]) model[i] = 0;
    for (int i = 0; i < 500; i++) begin
      int w, r;
      w = $urandom_range(0, 8); r = $urandom_range(0, 8);
      wr_sel = (w == 8) ? 8'd0 : 8'(1 << w);
      bus = 8'($urandom); alu_we = ($urandom_range(0, 3) == 0); alu_y = 8'($urandom);
      rd_sel = (r == 8) ? 8'd0 : 8'(1 << r);
      #1;
      checks++;
      if (rd_data !== ((r == 8 || r == 6) ? 8'd0 : model[r])) begin failures++; $display("FAIL read r=%0d got %h exp %h", r, rd_data, model[r]); end
      @(posedge clk); #1;
      if (w != 8 && w != 6) model[w] = bus;
      if (alu_we) model[7] = alu_y;
      checks++;
      if (a !== model[7] || hl !== {model[4], model[5]}) begin failures++; $display("FAIL a/hl"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
