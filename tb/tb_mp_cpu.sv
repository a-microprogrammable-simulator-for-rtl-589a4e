// Self-checking test of the CPU on its own, with a behavioural 64 KB memory
// and an input port (always 0x5A on I/O reads) modelled here.
// Runs program A without pipelining and program B in the three-stage mode,
// checks registers, flags, memory writes and the value written to the port,
// and counts the microinstructions to the HLT routine (198 and 65).
module tb_mp_cpu;
  import mpsim_pkg::*;
  import tb_ucode_pkg::*;

  logic clk = 0, rst = 1, cen = 0, mem_rd, mem_wr, io_m_n, ureset;
  logic cs_we = 0, dec_we = 0;
  logic [1:0] mode = 0;
  logic [15:0] addr, pc, sp;
  logic [7:0] ext_din, ext_dout, ir, acc, t, bus, last_out;
  logic [8:0] ld_addr = 0, upc;
  logic [30:0] ld_data = 0, uword;
  logic [7:0][7:0] regs;
  flags_t flags;
  logic [7:0] mem [65536];
  logic [30:0] cs [512];
  int checks = 0, failures = 0;

  mp_cpu dut (.clk, .rst, .cen, .mode, .addr, .ext_din, .ext_dout, .mem_rd, .mem_wr, .io_m_n,
              .cs_we, .dec_we, .ld_addr, .ld_data, .upc, .uword, .ureset, .ir, .pc, .sp,
              .acc, .t, .flags, .bus, .regs);

  always #5 clk = ~clk;

  // behavioural memory and ports
  assign ext_din = io_m_n ? mem[addr] : 8'h5A;
  always @(posedge clk) begin
    if (mem_wr && io_m_n) mem[addr] <= ext_dout;
    if (mem_wr && !io_m_n) last_out <= ext_dout;
  end

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  task automatic load(input bit prog_b);
    for (int i = 0; i < 512; i++) begin cs_we = 1; ld_addr = 9'(i); ld_data = cs[i]; @(posedge clk); #1; end
    cs_we = 0;
    for (int i = 0; i < 256; i++) begin dec_we = 1; ld_addr = 9'(i); ld_data = 31'(decode(8'(i), 1'b0)); @(posedge clk); #1; end
    dec_we = 0;
    for (int i = 0; i < 65536; i++) mem[i] = 8'h00;
    if (prog_b) for (int i = 0; i < PROG_B_LEN; i++) mem[i] = PROG_B[i];
    else        for (int i = 0; i < PROG_A_LEN; i++) mem[i] = PROG_A[i];
  endtask

  task automatic run(input logic [1:0] m, output int n);
    mode = m; rst = 1; cen = 0; last_out = 0;
    @(posedge clk); #1; rst = 0; cen = 1; n = 0;
    while (upc != 9'(A_HLT) && n < 1000) begin @(posedge clk); #1; n++; end
    cen = 0;
  endtask

  initial begin
    int n;
    build_ucode(cs);
    load(1'b0);
    run(MODE_NONE, n);
    chk("A cycles", n, 198);
    chk("A acc", acc, 8'h02); chk("A B", regs[0], 8'h07); chk("A D", regs[2], 8'h23);
    chk("A E", regs[3], 8'h01); chk("A HL", {regs[4], regs[5]}, 16'h1234);
    chk("A sp", sp, 16'h2000); chk("A pc", pc, 16'd40); chk("A flags", flags, 4'h0);
    chk("A mem1234", mem[16'h1234], 8'h53); chk("A mem2000", mem[16'h2000], 8'h53);
    chk("A out", last_out, 8'h23); chk("A ir", ir, 8'h76);

    load(1'b1);
    run(MODE_THREE, n);
    chk("B cycles", n, 65);
    chk("B acc", acc, 8'h69); chk("B B", regs[0], 8'h5A); chk("B C", regs[1], 8'h69);
    chk("B E", regs[3], 8'h4B); chk("B H", regs[4], 8'h40); chk("B out", last_out, 8'h69);
    chk("B flags", flags, 4'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
