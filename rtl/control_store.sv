// Microprogram control store, 512 words x 31 bits.
//
// Addressed by the microprogram counter; the addressed word is available in
// the same cycle (asynchronous read) and drives every control line of the
// machine for that cycle. The store is written through a load port before a
// run (the microprogram file). Sizes are the source's; the port timing is
// this design's choice. The array is not reset.
module control_store #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 31
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         word
);
  logic [WIDTH-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end
  assign word = mem[raddr];
endmodule
