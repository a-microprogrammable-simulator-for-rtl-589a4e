// Input port, BCD output port and the two 7-segment digits.
//
// I/O cycles are those with io_m_n = 0 (microinstruction bit 30 clear).
// An I/O write with address bit 14 set loads the 8-bit output register from
// the external data bus at the rising edge; its two nibbles drive the tens
// and units 7-segment digits through BCD decoders. An I/O read with address
// bit 15 set puts the switch inputs on the external data bus (rd_hit high,
// rdata the switches). The A14 / A15 selection follows the machine's screen
// picture; the rest of the decoding is this design's. The decoding is
// partial on purpose: address bits 13:0 are not looked at, so lint reports
// them unused. Synchronous reset
// clears the output register.
module io_ports (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] addr,
  input  logic        rd,
  input  logic        wr,
  input  logic        io_m_n,
  input  logic [7:0]  wdata,
  input  logic [7:0]  switches,
  output logic [7:0]  rdata,
  output logic        rd_hit,
  output logic [7:0]  out_q,
  output logic [6:0]  seg_hi,
  output logic [6:0]  seg_lo
);
  logic wr_hit;
  assign wr_hit = !io_m_n && wr && addr[14];
  assign rd_hit = !io_m_n && rd && addr[15];
  assign rdata  = rd_hit ? switches : 8'd0;

  always_ff @(posedge clk) begin
    if (rst)         out_q <= '0;
    else if (wr_hit) out_q <= wdata;
  end

  bcd_7seg u_hi (.bcd(out_q[7:4]), .seg(seg_hi));
  bcd_7seg u_lo (.bcd(out_q[3:0]), .seg(seg_lo));
endmodule
