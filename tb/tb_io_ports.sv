// Self-checking test of the I/O ports: output register loads only on an
// I/O write with A14 set, input port answers only an I/O read with A15 set,
// digits follow the output register.
module tb_io_ports;
  logic clk = 0, rst, rd, wr, io_m_n, rd_hit; logic [15:0] addr;
  logic [7:0] wdata, switches, rdata, out_q, model; logic [6:0] seg_hi, seg_lo;
  int checks = 0, failures = 0;
  io_ports dut (.clk, .rst, .addr, .rd, .wr, .io_m_n, .wdata, .switches, .rdata, .rd_hit, .out_q, .seg_hi, .seg_lo);
  always #5 clk = ~clk;
  initial begin
    rst = 1; rd = 0; wr = 0; io_m_n = 1; addr = 0; wdata = 0; switches = 0;
    @(posedge clk); #1; rst = 0; model = 0;
    for (int i = 0; i < 600; i++) begin
      logic hit;
      rd = 1'($urandom); wr = 1'($urandom); io_m_n = 1'($urandom); addr = 16'($urandom);
      wdata = 8'($urandom); switches = 8'($urandom);
      #1;
      hit = rd && !io_m_n && addr[15];
      checks++; if (rd_hit !== hit || rdata !== (hit ? switches : 8'h00)) begin failures++; $display("FAIL input port"); end
      @(posedge clk); #1;
      if (wr && !io_m_n && addr[14]) model = wdata;
      checks++; if (out_q !== model) begin failures++; $display("FAIL out=%h exp=%h", out_q, model); end
    end
    // digits: 0x42 -> "4" and "2"
    wr = 1; io_m_n = 0; addr = 16'h4000; wdata = 8'h42; @(posedge clk); #1; wr = 0;
    checks++; if (seg_hi !== 7'b1100110 || seg_lo !== 7'b1011011) begin failures++; $display("FAIL digits %b %b", seg_hi, seg_lo); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (3000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
