// Branch cost in the two-stage pipeline: an ordinary conditional branch
// against a delayed branch.
//
// Both programs compute 7 x 5 by repeated addition with a loop of five
// passes, on the whole machine in two-stage mode, with the overlapped test
// microcode (each MOV, ADD and DCR fetches the next instruction itself).
//   program C closes the loop with JNZ. Each pass leaves JNZ through the
//     two-word fetch at microaddress 0, so the pipe is cleared and refilled
//     on every branch, taken or not.
//   program D closes the loop with JNZD and moves the loop's last
//     instruction, MOV A,D, into the delay slot after it. The slot runs on
//     every pass and fetches from the branch target, so a taken JNZD costs
//     no refill.
// Hand counts: C takes 107 microinstructions and 9 fetches at address 0. D
// takes 99 microinstructions and 5 fetches. The difference, 8, is the
// 2-cycle refill on each of the 4 taken branches. Both must end with the
// same registers (A = D = 23h, B = 7, C = 0, Z set). The counts, the number
// of taken delayed branches (4) and of delay-slot runs (5) are checked.
// Last, program C is paused in its loop, its HLT is replaced by INR A, HLT
// through the load port, and the run continues without a reset: it must end
// 3 microinstructions later with A = 24h.
module tb_pipe_branch;
  import mpsim_pkg::*;
  import tb_ucode_pkg::*;

  logic clk = 0, rst = 1, run = 0, step = 0, ld_we = 0, ureset;
  logic [1:0] mode = MODE_TWO, ld_target = 0;
  logic [15:0] ld_addr = 0, pc, sp;
  logic [30:0] ld_data = 0, uword;
  logic [7:0] in_switches = 8'h00, out_port, acc, ir;
  logic [6:0] seg_hi, seg_lo;
  logic [8:0] upc;
  flags_t flags;
  logic [7:0][7:0] regs;
  logic [7:0] ld_rdata, t_reg, data_bus;
  int checks = 0, failures = 0;
  logic [30:0] cs [512];
  int fetches, delayed_taken, slot_runs;
  bit counting = 0;

  mp_system dut (.clk, .rst, .mode, .run, .step, .ld_we, .ld_target, .ld_addr, .ld_data,
                 .in_switches, .out_port, .seg_hi, .seg_lo, .upc, .uword, .ureset, .ir,
                 .pc, .sp, .acc, .t_reg, .data_bus, .flags, .regs, .ld_rdata);

  always #5 clk = ~clk;

  // the counters look at the microinstruction about to be executed
  always @(posedge clk) if (counting && run) begin
    if (upc == 9'(A_FETCH)) fetches <= fetches + 1;
    if (upc == 9'(A_JNZD + 1)) delayed_taken <= delayed_taken + 1;
    if (upc == 9'(A_MOVP) && ir == 8'h7A) slot_runs <= slot_runs + 1;
  end

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask

  task automatic ld(input logic [1:0] tgt, input int a, input logic [30:0] d);
    ld_we = 1; ld_target = tgt; ld_addr = 16'(a); ld_data = d;
    @(posedge clk); #1; ld_we = 0;
  endtask

  task automatic load_prog(input bit delayed);
    for (int i = 0; i < 32; i++) ld(2'd0, i, 31'(0));
    if (delayed) for (int i = 0; i < PROG_D_LEN; i++) ld(2'd0, i, 31'(PROG_D[i]));
    else         for (int i = 0; i < PROG_C_LEN; i++) ld(2'd0, i, 31'(PROG_C[i]));
  endtask

  task automatic run_prog(input string tag, input int exp_cycles, input int exp_fetches);
    int cycles = 0;
    fetches = 0; delayed_taken = 0; slot_runs = 0;
    rst = 1; @(posedge clk); #1; rst = 0;
    counting = 1; run = 1;
    while (upc != 9'(A_HLT) && cycles < 1000) begin @(posedge clk); #1; cycles++; end
    run = 0; counting = 0;
    $display("%s: %0d microinstructions, %0d fetches at address 0, %0d taken delayed branches, %0d slot runs",
             tag, cycles, fetches, delayed_taken, slot_runs);
    chk({tag, " cycles"}, 32'(cycles), 32'(exp_cycles));
    chk({tag, " fetches"}, 32'(fetches), 32'(exp_fetches));
    chk({tag, " A"}, 32'(regs[R_A]), 32'h23);
    chk({tag, " B"}, 32'(regs[R_B]), 32'h07);
    chk({tag, " C"}, 32'(regs[R_C]), 32'h00);
    chk({tag, " D"}, 32'(regs[R_D]), 32'h23);
    chk({tag, " Z"}, 32'(flags.z), 32'h1);
    chk({tag, " PC"}, 32'(pc), 32'd15);
    chk({tag, " IR"}, 32'(ir), 32'h76);
  endtask

  initial begin
    build_ucode(cs);
    for (int i = 0; i < 512; i++) ld(2'd1, i, cs[i]);
    for (int i = 0; i < 256; i++) ld(2'd2, i, 31'(decode_two(8'(i))));

    load_prog(1'b0);
    run_prog("JNZ", 107, 9);
    chk("JNZ taken delayed branches", 32'(delayed_taken), 32'd0);

    load_prog(1'b1);
    run_prog("JNZD", 99, 5);
    chk("JNZD taken delayed branches", 32'(delayed_taken), 32'd4);
    chk("JNZD delay-slot runs", 32'(slot_runs), 32'd5);

    // edit while paused, then continue: pause in the loop, replace the HLT
    // with INR A, HLT, and run on without a reset (3 more cycles: fetch, INR)
    load_prog(1'b0);
    begin
      int cycles = 0;
      logic [8:0] u0;
      logic [15:0] p0;
      rst = 1; @(posedge clk); #1; rst = 0;
      run = 1; repeat (40) begin @(posedge clk); #1; cycles++; end
      run = 0; u0 = upc; p0 = pc;
      ld(2'd0, 14, 31'h3C); ld(2'd0, 15, 31'h76);
      chk("edit while paused: machine held", {7'd0, upc, pc}, {7'd0, u0, p0});
      run = 1;
      while (upc != 9'(A_HLT) && cycles < 1000) begin @(posedge clk); #1; cycles++; end
      run = 0;
      chk("edit then continue: cycles", 32'(cycles), 32'd110);
      chk("edit then continue: A", 32'(regs[R_A]), 32'h24);
      chk("edit then continue: PC", 32'(pc), 32'd16);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
