// 16-bit stack pointer.
//
// High and low bytes are clocked from the 8-bit data bus separately
// (microinstruction bits 18 and 19). The machine has no increment or
// decrement line for it: microcode moves a byte through the ALU and back.
// Synchronous reset to zero.
module stack_pointer (
  input  logic        clk,
  input  logic        rst,
  input  logic        ld_hi,
  input  logic        ld_lo,
  input  logic [7:0]  bus,
  output logic [15:0] q
);
  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else begin
      if (ld_hi) q[15:8] <= bus;
      if (ld_lo) q[7:0]  <= bus;
    end
  end
endmodule
