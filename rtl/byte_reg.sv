// 8-bit register clocked from the data bus.
//
// Takes d at the rising clock edge when load is high and holds it otherwise;
// synchronous reset to zero. In the machine it is the temporary register T,
// clocked by microinstruction bit 11, whose output feeds only the ALU.
module byte_reg (
  input  logic       clk,
  input  logic       rst,
  input  logic       load,
  input  logic [7:0] d,
  output logic [7:0] q
);
  always_ff @(posedge clk) begin
    if (rst)       q <= '0;
    else if (load) q <= d;
  end
endmodule
