// Instruction decoder: op code to microprogram start address.
//
// A 256-entry table of 9-bit microprogram addresses indexed by the 8-bit op
// code, read combinationally. It is written through a load port before a run
// (the decoder file); patterns with don't-care bits in that file are expanded
// to every op code they cover by whoever loads the table. The translation is
// the source's; building it as a full lookup table is this design's choice.
// The table is not reset.
module instr_decoder #(
  parameter int unsigned OP_W   = 8,
  parameter int unsigned ADDR_W = 9
) (
  input  logic              clk,
  input  logic              we,
  input  logic [OP_W-1:0]   waddr,
  input  logic [ADDR_W-1:0] wdata,
  input  logic [OP_W-1:0]   opcode,
  output logic [ADDR_W-1:0] start_addr
);
  logic [ADDR_W-1:0] table_q [2**OP_W];
  always_ff @(posedge clk) begin
    if (we) table_q[waddr] <= wdata;
  end
  assign start_addr = table_q[opcode];
endmodule
