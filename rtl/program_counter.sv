// 16-bit program counter.
//
// The high and low bytes are clocked from the 8-bit data bus separately
// (microinstruction bits 22 and 23) and the whole counter increments when
// bit 24 is set. A byte load wins over the increment for that byte; the other
// byte still takes its part of the incremented value (this design's choice).
// Synchronous reset to zero, so the first instruction is at address 0.
module program_counter (
  input  logic        clk,
  input  logic        rst,
  input  logic        inc,
  input  logic        ld_hi,
  input  logic        ld_lo,
  input  logic [7:0]  bus,
  output logic [15:0] q
);
  logic [15:0] nxt;
  always_comb begin
    nxt = inc ? q + 16'd1 : q;
    if (ld_hi) nxt[15:8] = bus;
    if (ld_lo) nxt[7:0]  = bus;
  end
  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= nxt;
  end
endmodule
