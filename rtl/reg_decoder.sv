// 3:8 register decoder.
//
// Turns a 3-bit register code from the instruction register into a one-hot
// select: code 0 B, 1 C, 2 D, 3 E, 4 H, 5 L, 6 (no register), 7 A. With en low
// every output is low. Purely combinational. The machine uses two of these:
// the read decoder on IR bits 2:0 and the write decoder on IR bits 5:3.
module reg_decoder (
  input  logic       en,
  input  logic [2:0] code,
  output logic [7:0] sel
);
  always_comb begin
    sel = '0;
    if (en) sel[code] = 1'b1;
  end
endmodule
