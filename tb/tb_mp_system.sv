// End-to-end test of the whole machine at its default size.
//
// Loads the test microprogram, decoder table and a machine program through
// the load port, resets, runs to the HLT microroutine and compares the
// registers, memory, output port and 7-segment digits with values worked
// out by hand for each program. The number of microinstructions executed
// is checked against a hand count in every mode:
//   program A, no pipeline:              198
//   program A, two-stage, overlapped µcode: 178
//   program B, no pipeline / two-stage:   63
//   program B, three-stage:               65 (one extra start-up fetch)
//   program B, single-stepped:            63 steps
// It also counts each mechanism of the machine (microprogram counter
// increment, decoder dispatch, unconditional and conditional reset, fetch
// overlapped with execute, decode-ahead dispatch, I/O in and out, memory
// write, MAR from SP and from H:L, carry forwarding, pause between single
// steps) and fails any that never happened.
module tb_mp_system;
  import mpsim_pkg::*;
  import tb_ucode_pkg::*;

  logic clk = 0, rst = 1, run = 0, step = 0, ld_we = 0, ureset;
  logic [1:0] mode = 0, ld_target = 0;
  logic [15:0] ld_addr = 0, pc, sp;
  logic [30:0] ld_data = 0, uword;
  logic [7:0] in_switches = 8'h5A, out_port, acc, ir;
  logic [6:0] seg_hi, seg_lo;
  logic [8:0] upc;
  flags_t flags;
  int checks = 0, failures = 0;
  bit in_run = 0;
  logic [30:0] cs [512];
  logic [7:0][7:0] regs;
  logic [7:0] ld_rdata, t_reg, data_bus;

  mp_system dut (.clk, .rst, .mode, .run, .step, .ld_we, .ld_target, .ld_addr, .ld_data,
                 .in_switches, .out_port, .seg_hi, .seg_lo, .upc, .uword, .ureset, .ir,
                 .pc, .sp, .acc, .t_reg, .data_bus, .flags, .regs, .ld_rdata);

  always #5 clk = ~clk;

  // ---------------- mechanism counters ----------------
  typedef enum int { M_INC, M_DISPATCH, M_RESET, M_COND_TAKEN, M_COND_NOT, M_OVERLAP_FETCH,
                     M_DECODE_AHEAD, M_IO_IN, M_IO_OUT, M_MEM_WR, M_MAR_SP, M_MAR_HL,
                     M_CARRY_FWD, M_REG_MOVE, M_PAUSE, M_NUM } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"upc increment", "decoder dispatch", "unconditional reset",
    "conditional reset taken", "conditional reset not taken", "fetch overlapped with execute",
    "decode-ahead dispatch", "I/O input", "I/O output", "memory write", "MAR from SP",
    "MAR from HL", "carry forwarded", "register-to-register move", "pause between steps"};

  always @(posedge clk) if (!rst) begin
    uinstr_t w;
    w = uinstr_t'(uword);
    if (in_run && !(run | step)) mech[M_PAUSE]++;
    if (w.upc_inc && !ureset && !w.upc_load) mech[M_INC]++;
    if (w.upc_load && !ureset) mech[M_DISPATCH]++;
    if (w.cond_sel == COND_ALWAYS) mech[M_RESET]++;
    if (w.cond_sel == COND_ZERO && ureset) mech[M_COND_TAKEN]++;
    if (w.cond_sel == COND_ZERO && !ureset) mech[M_COND_NOT]++;
    if (mode == MODE_TWO && w.ir_clk && !w.upc_load) mech[M_OVERLAP_FETCH]++;
    if (mode == MODE_THREE && w.upc_load && !ureset && ir != 8'h00) mech[M_DECODE_AHEAD]++;
    if (w.mem_rd && !w.io_m_n) mech[M_IO_IN]++;
    if (w.mem_wr && !w.io_m_n) mech[M_IO_OUT]++;
    if (w.mem_wr && w.io_m_n) mech[M_MEM_WR]++;
    if (w.mar_clk && w.mar_sel == MAR_SP) mech[M_MAR_SP]++;
    if (w.mar_clk && w.mar_sel == MAR_HL) mech[M_MAR_HL]++;
    if (w.carry_fwd && flags.c) mech[M_CARRY_FWD]++;
    if (w.rdec_en && w.wdec_en) mech[M_REG_MOVE]++;
  end

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  task automatic chk32(input string what, input logic [31:0] got, input logic [31:0] exp);
    chk(what, got, exp);
  endtask

  task automatic ld(input logic [1:0] tgt, input int a, input logic [30:0] d);
    ld_we = 1; ld_target = tgt; ld_addr = 16'(a); ld_data = d;
    @(posedge clk); #1; ld_we = 0;
  endtask

  task automatic load_tables(input bit overlapped);
    for (int i = 0; i < 512; i++) ld(2'd1, i, cs[i]);
    for (int i = 0; i < 256; i++) ld(2'd2, i, 31'(decode(8'(i), overlapped)));
  endtask

  task automatic load_program(input bit prog_b);
    for (int i = 0; i < 64; i++) ld(2'd0, i, 31'(0));
    ld(2'd0, 16'h1234, 0); ld(2'd0, 16'h2000, 0);
    if (prog_b) for (int i = 0; i < PROG_B_LEN; i++) ld(2'd0, i, 31'(PROG_B[i]));
    else        for (int i = 0; i < PROG_A_LEN; i++) ld(2'd0, i, 31'(PROG_A[i]));
  endtask

  // Reset, then run (or single-step) until the HLT routine is reached.
  task automatic run_to_halt(input logic [1:0] m, input bit single, output int cycles);
    mode = m; rst = 1; run = 0; step = 0;
    @(posedge clk); #1; rst = 0;
    cycles = 0; in_run = 1;
    while (upc != 9'(A_HLT) && cycles < 2000) begin
      if (single) begin
        logic [8:0] u0; logic [15:0] p0;
        step = 1; @(posedge clk); #1; step = 0; cycles++;
        u0 = upc; p0 = pc;
        repeat (2) @(posedge clk); #1;
        chk("no change between steps", {7'd0, u0, p0}, {7'd0, upc, pc});
      end else begin
        run = 1; @(posedge clk); #1; cycles++;
      end
    end
    run = 0; in_run = 0;
    // the halt routine holds the machine
    repeat (3) @(posedge clk); #1;
    chk("halted", 32'(upc), 32'(A_HLT));
  endtask

  function automatic logic [7:0] r(input int code); return regs[code]; endfunction
  task automatic peek(input int a, output logic [7:0] v);
    ld_we = 0; ld_target = 0; ld_addr = 16'(a); #1; v = ld_rdata;
  endtask

  task automatic check_prog_a(input string tag);
    logic [7:0] v;
    chk32({tag, " A"}, 32'(r(7)), 8'h02); chk32({tag, " B"}, 32'(r(0)), 8'h07); chk32({tag, " C"}, 32'(r(1)), 8'h00);
    chk32({tag, " D"}, 32'(r(2)), 8'h23); chk32({tag, " E"}, 32'(r(3)), 8'h01); chk32({tag, " H"}, 32'(r(4)), 8'h12);
    chk32({tag, " L"}, 32'(r(5)), 8'h34); chk32({tag, " SP"}, 32'(sp), 16'h2000); chk32({tag, " PC"}, 32'(pc), 16'd40);
    chk32({tag, " flags"}, 32'(flags), 32'h0);
    chk32({tag, " out"}, 32'(out_port), 8'h23);
    chk32({tag, " digit hi"}, 32'(seg_hi), 7'b1011011); chk32({tag, " digit lo"}, 32'(seg_lo), 7'b1001111);
    peek(16'h1234, v); chk32({tag, " mem[1234]"}, 32'(v), 8'h53);
    peek(16'h2000, v); chk32({tag, " mem[2000]"}, 32'(v), 8'h53);
    chk32({tag, " ir"}, 32'(ir), 8'h76);
  endtask

  task automatic check_prog_b(input string tag);
    chk32({tag, " A"}, 32'(r(7)), 8'h69); chk32({tag, " B"}, 32'(r(0)), 8'h5A); chk32({tag, " C"}, 32'(r(1)), 8'h69);
    chk32({tag, " D"}, 32'(r(2)), 8'h00); chk32({tag, " E"}, 32'(r(3)), 8'h4B); chk32({tag, " H"}, 32'(r(4)), 8'h40);
    chk32({tag, " L"}, 32'(r(5)), 8'h00); chk32({tag, " flags"}, 32'(flags), 32'h0);
    chk32({tag, " out"}, 32'(out_port), 8'h69);
    chk32({tag, " digit hi"}, 32'(seg_hi), 7'b1111101); chk32({tag, " digit lo"}, 32'(seg_lo), 7'b1101111);
  endtask

  initial begin
    int n;
    foreach (mech[i]) mech[i] = 0;
    build_ucode(cs);

    load_tables(1'b0);
    load_program(1'b0);
    run_to_halt(MODE_NONE, 0, n); chk("A mode0 cycles", n, 198); check_prog_a("A/none");

    load_tables(1'b1);
    load_program(1'b0);
    run_to_halt(MODE_TWO, 0, n); chk("A mode1 cycles", n, 178); check_prog_a("A/two");

    load_tables(1'b0);
    load_program(1'b1);
    run_to_halt(MODE_NONE, 0, n);  chk("B mode0 cycles", n, 63); check_prog_b("B/none");
    load_program(1'b1);
    run_to_halt(MODE_TWO, 0, n);   chk("B mode1 cycles", n, 63); check_prog_b("B/two");
    load_program(1'b1);
    run_to_halt(MODE_THREE, 0, n); chk("B mode2 cycles", n, 65); check_prog_b("B/three");
    load_program(1'b1);
    run_to_halt(MODE_NONE, 1, n);  chk("B stepped count", n, 63); check_prog_b("B/step");

    for (int i = 0; i < M_NUM; i++) begin
      $display("mechanism %-30s %0d", mech_name[i], mech[i]);
      checks++;
      if (mech[i] == 0) begin failures++; $display("FAIL mechanism never happened: %s", mech_name[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
