// Instruction register and the instruction pipeline registers.
//
// The machine runs in one of three modes, set by mode and meant to be
// changed only while rst is held:
//
//   MODE_NONE  - bit 2 (ir_clk) clocks the data bus into the IR. The decoder
//                is fed the bus in that cycle (the IR otherwise), so the same
//                microinstruction can set bit 1 (advance) and load the
//                microprogram counter with the new instruction's address.
//   MODE_TWO   - a pipeline register sits in front of the IR. Bit 2 clocks the
//                bus into it while the IR still holds the instruction being
//                executed (fetch overlaps execute). Bit 1 moves it into the IR
//                and the decoder translates it in that same cycle; when bits 1
//                and 2 are set together the bus goes straight through.
//   MODE_THREE - as MODE_TWO, plus a register after the instruction decoder
//                and one after each 3:8 register decoder. The decoded-address
//                register samples the decode of the IR every enabled cycle,
//                so an instruction is decoded while another executes. Bit 1
//                loads the microprogram counter from that register, latches
//                the IR's one-hot register selects for the execute stage and
//                moves the pipeline register into the IR. An instruction must
//                therefore spend at least one cycle in the IR.
//
// Outputs: dec_op goes to the instruction decoder and dec_addr comes back;
// start_addr is what the microprogram counter loads on bit 1; rd_sel/wr_sel
// are the one-hot source (IR bits 2:0) and destination (IR bits 5:3)
// selects, still to be gated by microinstruction bits 14 and 15. Reset clears
// every register, so op code 0 fills the pipe. The register placement is
// the source's; the transfer rules above are this design's reading of it.
module ir_pipeline
  import mpsim_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       cen,
  input  logic [1:0] mode,
  input  logic [7:0] bus,
  input  logic       ir_clk,
  input  logic       advance,
  output logic [7:0] dec_op,
  input  logic [8:0] dec_addr,
  output logic [8:0] start_addr,
  output logic [7:0] rd_sel,
  output logic [7:0] wr_sel,
  output logic [7:0] ir
);
  logic [7:0] pipe_q;              // register in front of the IR
  logic [7:0] pipe_in;             // value the IR takes on advance
  logic [8:0] dec_q;               // register after the instruction decoder
  logic [7:0] rsel_q, wsel_q;      // registers after the register decoders
  logic [7:0] rsel_d, wsel_d;      // combinational decodes of the IR
  mode_e      m;

  assign m       = mode_e'(mode);
  assign pipe_in = ir_clk ? bus : pipe_q;

  reg_decoder u_rdec (.en(1'b1), .code(ir[2:0]), .sel(rsel_d));
  reg_decoder u_wdec (.en(1'b1), .code(ir[5:3]), .sel(wsel_d));

  always_ff @(posedge clk) begin
    if (rst) begin
      ir     <= '0;
      pipe_q <= '0;
      dec_q  <= '0;
      rsel_q <= '0;
      wsel_q <= '0;
    end else begin
      if (m == MODE_NONE) begin
        if (ir_clk) ir <= bus;
      end else begin
        if (ir_clk)  pipe_q <= bus;
        if (advance) ir     <= pipe_in;
      end
      if (m == MODE_THREE) begin
        if (cen) dec_q <= dec_addr;
        if (advance) begin
          rsel_q <= rsel_d;
          wsel_q <= wsel_d;
        end
      end
    end
  end

  always_comb begin
    unique case (m)
      MODE_NONE:  begin dec_op = ir_clk ? bus : ir; start_addr = dec_addr; end
      MODE_TWO:   begin dec_op = pipe_in;           start_addr = dec_addr; end
      default:    begin dec_op = ir;                start_addr = dec_q;    end
    endcase
    if (m == MODE_THREE) begin
      rd_sel = rsel_q;
      wr_sel = wsel_q;
    end else begin
      rd_sel = rsel_d;
      wr_sel = wsel_d;
    end
  end

  // Three-stage rule: the decoded-address register needs one cycle with the
  // new instruction in the IR, so two dispatches may not follow each other.
  logic adv_last;
  always_ff @(posedge clk) begin
    if (rst)      adv_last <= 1'b0;
    else if (cen) adv_last <= advance;
  end
  a_decode_needs_a_cycle: assert property (@(posedge clk) disable iff (rst)
    (m == MODE_THREE && cen && adv_last) |-> !advance)
    else $error("three-stage mode: dispatch in the cycle right after a dispatch");
endmodule
