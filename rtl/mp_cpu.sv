// Microprogrammed 8-bit CPU (accumulator machine, 8080-like register set).
//
// Every clock in which cen is high executes one 31-bit microinstruction read
// from the control store at the microprogram counter. Its bits are wired
// directly to the hardware: output enables put at most one source on the
// 8-bit internal data bus (read-decoded register, MBR, SP or PC byte) and
// clocks load registers from that bus at the rising edge, so a
// register-to-register move takes one microinstruction. When cen is low the
// word is replaced by zeros and nothing changes, which gives the run and
// single-step modes.
//
// The register fields of the IR drive two 3:8 decoders: bits 2:0 name the
// source put on the bus (microinstruction bit 14), bits 5:3 the destination
// clocked from it (bit 15). Code 110 names no register. The ALU works on the
// accumulator and T; every function other than "none" writes its result to
// A and its flags to the flag register. The MAR takes PC, SP or H:L and
// drives the external address bus; the MBR couples the internal and external
// data buses. The instruction decoder turns an op code into the start address
// of its microcode, and ir_pipeline adds the registers of the two- and
// three-stage pipeline modes.
//
// Interface: addr / ext_din / ext_dout / mem_rd / mem_wr / io_m_n are the
// external bus (io_m_n = 1 memory, 0 I/O); cs_we / dec_we / ld_addr /
// ld_data load the control store and decoder table. The rest are status
// outputs. The choice of which decoder is source and which destination, and
// that the ALU writes A directly, are this design's reading where the source
// material is not consistent or silent (see the README).
module mp_cpu
  import mpsim_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        cen,
  input  logic [1:0]  mode,
  // external bus
  output logic [15:0] addr,
  input  logic [7:0]  ext_din,
  output logic [7:0]  ext_dout,
  output logic        mem_rd,
  output logic        mem_wr,
  output logic        io_m_n,
  // table loading
  input  logic        cs_we,
  input  logic        dec_we,
  input  logic [8:0]  ld_addr,
  input  logic [30:0] ld_data,
  // status
  output logic [8:0]  upc,
  output logic [30:0] uword,
  output logic        ureset,
  output logic [7:0]  ir,
  output logic [15:0] pc,
  output logic [15:0] sp,
  output logic [7:0]  acc,
  output logic [7:0]  t,
  output flags_t      flags,
  output logic [7:0]  bus,
  output logic [7:0][7:0] regs
);
  uinstr_t     u;
  logic [30:0] cs_word;
  logic [7:0]  dec_op;
  logic [8:0]  dec_addr, start_addr;
  logic [7:0]  rd_sel, wr_sel, rd_sel_g, wr_sel_g;
  logic [7:0]  rf_data, mbr_to_int;
  logic [15:0] hl;
  logic [7:0]  alu_y;
  logic        alu_a_we, alu_f_we;
  flags_t      alu_flags;

  control_store #(.DEPTH(CS_DEPTH), .WIDTH(UW)) u_cs (
    .clk, .we(cs_we), .waddr(ld_addr), .wdata(ld_data), .raddr(upc), .word(cs_word));

  assign u     = cen ? uinstr_t'(cs_word) : '0;
  assign uword = u;

  upc_logic #(.CNT_W(UPC_W)) u_upc (
    .clk, .rst, .inc(u.upc_inc), .load(u.upc_load), .cond_sel(u.cond_sel),
    .load_addr(start_addr), .flags, .upc, .reset_taken(ureset));

  ir_pipeline u_irp (
    .clk, .rst, .cen, .mode, .bus, .ir_clk(u.ir_clk), .advance(u.upc_load),
    .dec_op, .dec_addr, .start_addr, .rd_sel, .wr_sel, .ir);

  instr_decoder #(.OP_W(8), .ADDR_W(UPC_W)) u_idec (
    .clk, .we(dec_we), .waddr(ld_addr[7:0]), .wdata(ld_data[8:0]),
    .opcode(dec_op), .start_addr(dec_addr));

  assign rd_sel_g = rd_sel & {8{u.rdec_en}};
  assign wr_sel_g = wr_sel & {8{u.wdec_en}};

  gp_regfile u_rf (
    .clk, .rst, .wr_sel(wr_sel_g), .rd_sel(rd_sel_g), .bus,
    .alu_we(alu_a_we), .alu_y, .rd_data(rf_data), .a(acc), .hl, .view(regs));

  byte_reg u_t (.clk, .rst, .load(u.t_clk), .d(bus), .q(t));

  alu u_alu (
    .a(acc), .t, .fn(u.alu_fn), .fwd(u.carry_fwd), .c_flag(flags.c),
    .y(alu_y), .a_we(alu_a_we), .flags_we(alu_f_we), .flags_in(alu_flags));

  flag_reg u_flags (.clk, .rst, .we(alu_f_we), .d(alu_flags), .q(flags));

  program_counter u_pc (
    .clk, .rst, .inc(u.pc_inc), .ld_hi(u.pch_clk), .ld_lo(u.pcl_clk), .bus, .q(pc));

  stack_pointer u_sp (
    .clk, .rst, .ld_hi(u.sph_clk), .ld_lo(u.spl_clk), .bus, .q(sp));

  mar_unit u_mar (
    .clk, .rst, .sel(u.mar_sel), .load(u.mar_clk), .pc, .sp, .hl, .mar(addr));

  mem_buffer u_mbr (
    .clk, .rst, .out_en(u.mbr_ext_oe), .in_en(u.mbr_int_oe), .rd(u.mem_rd),
    .int_bus(bus), .ext_bus(ext_din), .to_int(mbr_to_int), .to_ext(ext_dout));

  // Internal data bus: AND-OR of every enabled source.
  always_comb begin
    bus = rf_data | mbr_to_int;
    if (u.sph_oe) bus |= sp[15:8];
    if (u.spl_oe) bus |= sp[7:0];
    if (u.pch_oe) bus |= pc[15:8];
    if (u.pcl_oe) bus |= pc[7:0];
  end

  assign mem_rd = u.mem_rd;
  assign mem_wr = u.mem_wr;
  assign io_m_n = u.io_m_n;

  // Only one source may drive the bus in a microinstruction.
  a_one_bus_source: assert property (@(posedge clk) disable iff (rst)
    $onehot0({(|rd_sel_g[5:0]) | rd_sel_g[7], u.mbr_int_oe,
              u.sph_oe, u.spl_oe, u.pch_oe, u.pcl_oe}))
    else $error("more than one source enabled on the data bus (uPC %0d)", upc);
endmodule
