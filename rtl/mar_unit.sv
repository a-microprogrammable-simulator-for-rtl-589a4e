// Memory address register with its 16-bit 4:1 source multiplexer.
//
// sel (microinstruction bits 26:25, bit 25 least significant) picks nothing
// (zero), the program counter, the stack pointer or the H:L pair; bit 27
// clocks the chosen value into the MAR at the rising edge. The MAR drives the
// external address bus. The code for the PC matches the fetch word printed in
// the machine's screen picture (bit 25 set, bit 26 clear); the codes for SP
// and HL follow the order the bit table lists the sources in.
module mar_unit
  import mpsim_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [1:0]  sel,
  input  logic        load,
  input  logic [15:0] pc,
  input  logic [15:0] sp,
  input  logic [15:0] hl,
  output logic [15:0] mar
);
  logic [15:0] src;
  always_comb begin
    unique case (mar_sel_e'(sel))
      MAR_PC:  src = pc;
      MAR_SP:  src = sp;
      MAR_HL:  src = hl;
      default: src = '0;
    endcase
  end
  always_ff @(posedge clk) begin
    if (rst)       mar <= '0;
    else if (load) mar <= src;
  end
endmodule
