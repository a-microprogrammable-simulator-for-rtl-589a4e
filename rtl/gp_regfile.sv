// Accumulator and general registers B, C, D, E, H, L.
//
// Each register is clocked from the internal data bus by its line of the
// write decoder (one-hot wr_sel, code order B C D E H L - A) and put on the
// bus by its line of the read decoder (one-hot rd_sel, AND-OR multiplexed
// onto rd_data; rd_data is zero when no line is set). Line 6 names no register.
// The accumulator is also loaded from the ALU result when alu_we is high;
// that write wins over a bus write in the same cycle (this design's choice).
// H and L are brought out as the 16-bit pair used to address memory, and
// view shows every register for display (entry 6 is always zero).
// Synchronous reset clears every register.
module gp_regfile
  import mpsim_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  wr_sel,
  input  logic [7:0]  rd_sel,
  input  logic [7:0]  bus,
  input  logic        alu_we,
  input  logic [7:0]  alu_y,
  output logic [7:0]  rd_data,
  output logic [7:0]  a,
  output logic [15:0] hl,
  output logic [7:0][7:0] view   // every register, index = register code
);
  logic [7:0] regs [8];   // index = register code; entry 6 is unused

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 8; i++) regs[i] <= '0;
    end else begin
      for (int i = 0; i < 8; i++)
        if (wr_sel[i] && i != int'(R_NONE)) regs[i] <= bus;
      if (alu_we) regs[R_A] <= alu_y;
    end
  end

  always_comb begin
    rd_data = '0;
    for (int i = 0; i < 8; i++)
      if (rd_sel[i] && i != int'(R_NONE)) rd_data |= regs[i];
  end

  assign a  = regs[R_A];
  assign hl = {regs[R_H], regs[R_L]};
  always_comb for (int i = 0; i < 8; i++) view[i] = regs[i];
endmodule
