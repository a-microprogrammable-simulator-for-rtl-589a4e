// Memory buffer register (MBR) between the internal and external data buses.
//
// Memory-to-CPU: in every read cycle (rd) the MBR captures the external bus;
// when in_en (microinstruction bit 13) is high, to_int carries the external
// bus straight through in a read cycle, or the held value otherwise, so one
// microinstruction can read memory and clock the byte into a register.
// CPU-to-memory: when out_en (bit 12) is high the internal bus is passed to
// the external bus in that cycle (to_ext) and also captured. Outside those
// cycles to_ext shows the held value. The two enables are the source's; the
// capture rules are this design's. Synchronous reset to zero.
module mem_buffer (
  input  logic       clk,
  input  logic       rst,
  input  logic       out_en,
  input  logic       in_en,
  input  logic       rd,
  input  logic [7:0] int_bus,
  input  logic [7:0] ext_bus,
  output logic [7:0] to_int,
  output logic [7:0] to_ext
);
  logic [7:0] q;
  always_ff @(posedge clk) begin
    if (rst)         q <= '0;
    else if (rd)     q <= ext_bus;
    else if (out_en) q <= int_bus;
  end
  assign to_int = in_en ? (rd ? ext_bus : q) : 8'd0;
  assign to_ext = out_en ? int_bus : q;
endmodule
