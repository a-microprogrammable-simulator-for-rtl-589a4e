// Program and data memory, 64K x 8.
//
// Holds the user's machine program and data. The read is asynchronous
// (rdata follows addr in the same cycle) so a single microinstruction can
// read a byte and clock it into a register; the write happens at the rising
// edge when we is high. A second write port (ld_*) loads the program before
// a run and wins over the CPU port;
// ld_rdata reads the byte at ld_addr, so the memory can be inspected. Size is the source's; the port timing is
// this design's choice. The array is not reset.
module prog_mem #(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata,
  input  logic          ld_we,
  input  logic [AW-1:0] ld_addr,
  input  logic [7:0]    ld_data,
  output logic [7:0]    ld_rdata
);
  logic [7:0] mem [2**AW];
  always_ff @(posedge clk) begin
    if (ld_we)   mem[ld_addr] <= ld_data;
    else if (we) mem[addr]    <= wdata;
  end
  assign rdata    = mem[addr];
  assign ld_rdata = mem[ld_addr];
endmodule
