// Self-checking test of the IR stage in its three modes. A stand-in decoder
// function f() maps op codes to start addresses. Checks which op code is
// decoded when, which value the microprogram counter would load, when the
// IR changes, and where the register selects come from in each mode.
module tb_ir_pipeline;
  import mpsim_pkg::*;
  logic clk = 0, rst, cen, ir_clk, advance; logic [1:0] mode;
  logic [7:0] bus, dec_op, rd_sel, wr_sel, ir; logic [8:0] dec_addr, start_addr;
  int checks = 0, failures = 0;
  ir_pipeline dut (.clk, .rst, .cen, .mode, .bus, .ir_clk, .advance, .dec_op, .dec_addr, .start_addr, .rd_sel, .wr_sel, .ir);
  always #5 clk = ~clk;
  function automatic logic [8:0] f(input logic [7:0] op); return {op, 1'b0} ^ 9'h155; endfunction
  assign dec_addr = f(dec_op);

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h (mode %0d)", what, got, exp, mode); end
  endtask
  task automatic do_reset(input logic [1:0] m);
    mode = m; rst = 1; cen = 1; ir_clk = 0; advance = 0; bus = 0;
    @(posedge clk); #1; rst = 0;
  endtask
  task automatic cyc(input logic [7:0] b, input logic ic, input logic adv);
    bus = b; ir_clk = ic; advance = adv;
  endtask

  initial begin
    // ---- no pipeline ----
    do_reset(MODE_NONE);
    cyc(8'h47, 1, 1); #1;
    chk("m0 decode bus", dec_op, 8'h47); chk("m0 start", start_addr, f(8'h47));
    @(posedge clk); #1; cyc(8'h00, 0, 0); #1;
    chk("m0 ir", ir, 8'h47); chk("m0 dec ir", dec_op, 8'h47);
    chk("m0 rd_sel", rd_sel, 8'h80); chk("m0 wr_sel", wr_sel, 8'h01);

    // ---- two-stage ----
    do_reset(MODE_TWO);
    cyc(8'h5A, 1, 0); @(posedge clk); #1; cyc(8'h00, 0, 0); #1;
    chk("m1 ir kept", ir, 8'h00); chk("m1 decode pipe", dec_op, 8'h5A);
    chk("m1 rd_sel from ir", rd_sel, 8'h01);
    cyc(8'h00, 0, 1); #1; chk("m1 start", start_addr, f(8'h5A));
    @(posedge clk); #1; cyc(8'h00, 0, 0); #1;
    chk("m1 ir moved", ir, 8'h5A); chk("m1 rd_sel", rd_sel, 8'h04); chk("m1 wr_sel", wr_sel, 8'h08);
    cyc(8'h13, 1, 1); #1; chk("m1 bypass start", start_addr, f(8'h13));
    @(posedge clk); #1; cyc(8'h00, 0, 0); #1; chk("m1 bypass ir", ir, 8'h13);

    // ---- three-stage ----
    do_reset(MODE_THREE);
    cyc(8'h4F, 1, 1); #1; chk("m2 start after reset", start_addr, 9'h000);
    @(posedge clk); #1; cyc(8'h00, 0, 0); #1;
    chk("m2 ir", ir, 8'h4F); chk("m2 decode ir", dec_op, 8'h4F);
    chk("m2 start stale", start_addr, f(8'h00));
    @(posedge clk); #1;
    chk("m2 start decoded", start_addr, f(8'h4F));
    cyc(8'h2C, 1, 1); @(posedge clk); #1; cyc(8'h00, 0, 0); #1;
    chk("m2 ir next", ir, 8'h2C);
    chk("m2 rd_sel of executing", rd_sel, 8'h80); chk("m2 wr_sel of executing", wr_sel, 8'h02);
    chk("m2 start still", start_addr, f(8'h4F));
    cen = 0; @(posedge clk); #1;
    chk("m2 cen low holds", start_addr, f(8'h4F));
    cen = 1; @(posedge clk); #1;
    chk("m2 next decoded", start_addr, f(8'h2C));
    chk("m2 selects held", rd_sel, 8'h80);
    // fetch into the pipe register while another instruction sits in the IR
    cyc(8'h9B, 1, 0); @(posedge clk); #1; cyc(8'h00, 0, 0); #1;
    chk("m2 ir unchanged by fetch", ir, 8'h2C);
    cyc(8'h00, 0, 1); @(posedge clk); #1; cyc(8'h00, 0, 0); #1;
    chk("m2 pipe to ir", ir, 8'h9B); chk("m2 rd_sel 2C", rd_sel, 8'h10); chk("m2 wr_sel 2C", wr_sel, 8'h20);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
