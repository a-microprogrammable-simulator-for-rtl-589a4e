// 8-bit, 16-function ALU of the accumulator loop.
//
// Operands are the accumulator A and the temporary register T; the 4-bit
// function comes straight from microinstruction bits 10:7 and the carry in is
// the carry flag when microinstruction bit 3 forwards it (fwd). The rotates
// go through the carry when fwd is set and are plain 8-bit rotates otherwise. The ALU is purely
// combinational: y is the new accumulator value, a_we says whether A is
// written, flags_we whether the flag register is written, flags_in the new
// {P,S,Z,C}. Function 0 writes nothing, so a microinstruction that does not
// use the ALU leaves A and the flags alone.
//
// A 16-function 8-bit ALU with carry, zero, sign and parity flags is the
// source's; which 16 functions, and the 8080-style flag rules (C is the carry
// out or the borrow, logic functions clear C, P is 1 for even parity) are
// this design's choice.
module alu
  import mpsim_pkg::*;
(
  input  logic [7:0] a,
  input  logic [7:0] t,
  input  logic [3:0] fn,
  input  logic       fwd,      // microinstruction bit 3
  input  logic       c_flag,   // current carry flag
  output logic [7:0] y,
  output logic       a_we,
  output logic       flags_we,
  output flags_t     flags_in
);
  logic [8:0] wide;     // result with carry / borrow in bit 8
  logic [7:0] res;      // value used for Z, S, P
  logic       cin;      // forwarded carry

  assign cin = fwd & c_flag;

  always_comb begin
    wide     = '0;
    a_we     = 1'b1;
    flags_we = 1'b1;
    unique case (alu_fn_e'(fn))
      ALU_NOP:  begin wide = {1'b0, a}; a_we = 1'b0; flags_we = 1'b0; end
      ALU_ADD:  wide = {1'b0, a} + {1'b0, t} + 9'(cin);
      ALU_SUB:  wide = {1'b0, a} - {1'b0, t} - 9'(cin);
      // logic functions clear the carry
      ALU_AND:  wide = {1'b0, a & t};
      ALU_OR:   wide = {1'b0, a | t};
      ALU_XOR:  wide = {1'b0, a ^ t};
      ALU_NOT:  wide = {1'b0, ~a};
      ALU_INC:  wide = {1'b0, a} + 9'd1;
      ALU_DEC:  wide = {1'b0, a} - 9'd1;
      ALU_ROL:  wide = {a[7], a[6:0], (fwd ? c_flag : a[7])};
      ALU_ROR:  wide = {a[0], (fwd ? c_flag : a[0]), a[7:1]};
      ALU_PASS: wide = {1'b0, t};
      ALU_CMP:  begin wide = {1'b0, a} - {1'b0, t}; a_we = 1'b0; end
      ALU_NEG:  wide = 9'd0 - {1'b0, a};
      ALU_CLR:  wide = '0;
      ALU_SWAP: wide = {1'b0, a[3:0], a[7:4]};
      default:  wide = '0;
    endcase
    res = wide[7:0];
    y   = a_we ? res : a;
    flags_in.c = wide[8];
    flags_in.z = (res == 8'd0);
    flags_in.s = res[7];
    flags_in.p = even_parity(res);
  end
endmodule
