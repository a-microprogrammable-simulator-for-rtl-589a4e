// Microprogram counter logic.
//
// A 9-bit counter that addresses the control store. Each rising edge it
// either resets to 0 (the input chosen by cond_sel on the 8:1 condition
// multiplexer is 1), loads the start address from the instruction decoder
// (load, microinstruction bit 1), increments (inc, bit 0), or holds. Reset
// wins over load, load over increment (this design's order). The multiplexer
// inputs are constant 0, constant 1, carry, zero, sign and parity, with
// inputs 6 and 7 tied to 0. Returning to 0 ends a machine instruction,
// because the fetch sequence lives at address 0. reset_taken reports, in the
// same cycle, that the selected condition is 1.
module upc_logic
  import mpsim_pkg::*;
#(
  parameter int unsigned CNT_W = 9
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             inc,
  input  logic             load,
  input  logic [2:0]       cond_sel,
  input  logic [CNT_W-1:0] load_addr,
  input  flags_t           flags,
  output logic [CNT_W-1:0] upc,
  output logic             reset_taken
);
  always_comb begin
    unique case (cond_e'(cond_sel))
      COND_NEVER:  reset_taken = 1'b0;
      COND_ALWAYS: reset_taken = 1'b1;
      COND_CARRY:  reset_taken = flags.c;
      COND_ZERO:   reset_taken = flags.z;
      COND_SIGN:   reset_taken = flags.s;
      COND_PARITY: reset_taken = flags.p;
      default:     reset_taken = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst || reset_taken) upc <= '0;
    else if (load)          upc <= load_addr;
    else if (inc)           upc <= upc + 1'b1;
  end
endmodule
