// Flag register: carry, zero, sign and parity.
//
// Loads the four flags computed by the ALU at the rising clock edge when we
// is high (the ALU raises it for every function except "none"); holds them
// otherwise. Synchronous reset to zero, as the machine clears every register
// on reset. Output order {P,S,Z,C}. The four flags are the source's; when
// they load is this design's choice, since no microinstruction bit clocks
// them.
module flag_reg
  import mpsim_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   we,
  input  flags_t d,
  output flags_t q
);
  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (we) q <= d;
  end
endmodule
