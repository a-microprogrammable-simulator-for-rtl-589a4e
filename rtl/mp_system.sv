// The complete machine: CPU, 64 KB program/data memory and I/O ports.
//
// The CPU's external bus reaches the memory when io_m_n is 1 and the ports
// when it is 0 (input port on address bit 15, output port on bit 14). The
// output port's two BCD nibbles are shown on two 7-segment digits.
//
// Run control: with run high one microinstruction executes every clock; with
// run low a one-cycle pulse on step executes exactly one (single stepping).
// mode selects no pipelining (0), the two-stage fetch/execute pipe (1) or
// the three-stage fetch/decode/execute pipe (2); change it only under rst.
//
// Loading: while run and step are low, ld_we writes ld_data at ld_addr into
// the program memory (ld_target 0, low 8 bits), the control store
// (ld_target 1, 31 bits at a 9-bit address) or the instruction decoder
// table (ld_target 2, 9-bit start address at an 8-bit op code). rst is
// ld_rdata shows the program memory byte at ld_addr and regs the
// register file, as a front panel would. rst is
// synchronous and clears every register, so the machine starts at
// microinstruction 0 and machine address 0. The tables are not cleared.
module mp_system
  import mpsim_pkg::*;
#(
  parameter int unsigned MEM_AW = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [1:0]  mode,
  input  logic        run,
  input  logic        step,
  input  logic        ld_we,
  input  logic [1:0]  ld_target,
  input  logic [15:0] ld_addr,
  input  logic [30:0] ld_data,
  input  logic [7:0]  in_switches,
  output logic [7:0]  out_port,
  output logic [6:0]  seg_hi,
  output logic [6:0]  seg_lo,
  output logic [8:0]  upc,
  output logic [30:0] uword,
  output logic        ureset,
  output logic [7:0]  ir,
  output logic [15:0] pc,
  output logic [15:0] sp,
  output logic [7:0]  acc,
  output logic [7:0]  t_reg,
  output logic [7:0]  data_bus,
  output flags_t      flags,
  output logic [7:0][7:0] regs,   // A..L by register code, for display
  output logic [7:0]  ld_rdata    // program memory at ld_addr, for display
);
  logic        cen;
  logic [15:0] addr;
  logic [7:0]  ext_din, ext_dout, mem_rdata, io_rdata;
  logic        mem_rd, mem_wr, io_m_n, io_hit;

  assign cen = run | step;

  mp_cpu u_cpu (
    .clk, .rst, .cen, .mode,
    .addr, .ext_din, .ext_dout, .mem_rd, .mem_wr, .io_m_n,
    .cs_we(ld_we && ld_target == 2'd1), .dec_we(ld_we && ld_target == 2'd2),
    .ld_addr(ld_addr[8:0]), .ld_data,
    .upc, .uword, .ureset, .ir, .pc, .sp, .acc, .t(t_reg), .flags, .bus(data_bus), .regs);

  prog_mem #(.AW(MEM_AW)) u_mem (
    .clk, .addr(addr[MEM_AW-1:0]), .we(mem_wr && io_m_n), .wdata(ext_dout),
    .rdata(mem_rdata), .ld_we(ld_we && ld_target == 2'd0),
    .ld_addr(ld_addr[MEM_AW-1:0]), .ld_data(ld_data[7:0]), .ld_rdata);

  io_ports u_io (
    .clk, .rst, .addr, .rd(mem_rd), .wr(mem_wr), .io_m_n, .wdata(ext_dout),
    .switches(in_switches), .rdata(io_rdata), .rd_hit(io_hit),
    .out_q(out_port), .seg_hi, .seg_lo);

  // External data bus into the CPU: memory in memory cycles, the input port
  // in I/O cycles that select it, otherwise zero.
  assign ext_din = io_m_n ? mem_rdata : (io_hit ? io_rdata : 8'd0);
endmodule
