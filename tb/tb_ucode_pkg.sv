// Test microprogram, decoder table and machine programs for the CPU and
// system testbenches.
//
// The instruction set is a small 8080-like one built only for testing:
//   00DDD110 MVI r,imm   01DDDSSS MOV r,r   0x76 HLT    0x77 MOV M,A
//   0x7E MOV A,M   10000SSS ADD r   10001SSS ADC r   10010SSS SUB r
//   0x3C INR A  0x3D DCR A  0x07 RLC  0x0F RRC  0x2F CMA  0xAF CLR A
//   0xE7 OUT (A to port at H:L)  0xFE IN A (port at H:L)
//   0xC2 JNZ a8 (jump within page 0)  0x31 LDSP lo,hi  0xF7 STSP (A to [SP])
//   0xC4 JNZD a8 (delayed JNZ within the current page, two-stage table only)
// Every microroutine ends by resetting the microprogram counter to the
// two-word fetch at address 0, except the "overlapped" MOV and ADD variants
// used in two-stage mode, which fetch the next instruction themselves and
// dispatch it directly.
//
// The two-stage table (decode_two) adds a delayed branch. JNZD reads its
// target into PCL, points the MAR at the byte after the operand and
// dispatches that byte, the delay slot, which then fetches from the target:
// a taken JNZD costs no fetch. JNZ, by contrast, leaves through the
// two-word fetch at address 0 on either path, so each branch clears the
// pipe and refills it.
package tb_ucode_pkg;
  import mpsim_pkg::*;

  // microroutine start addresses
  localparam int A_FETCH = 0, A_MOV = 2, A_ADD = 3, A_SUB = 5, A_MVI = 7, A_OUT = 9, A_IN = 11,
                 A_JNZ = 13, A_STM = 16, A_LDM = 18, A_ADC = 20, A_LDSP = 22, A_STSP = 26,
                 A_HLT = 28, A_DCR = 29, A_INR = 30, A_RRC = 31, A_RLC = 32, A_CMA = 33,
                 A_CLR = 34, A_MOVP = 40, A_ADDP = 42, A_DCRP = 46, A_JNZD = 48;

  function automatic uinstr_t w_fetch_addr();           // MAR <- PC, PC++
    uinstr_t w = '0; w.mar_sel = MAR_PC; w.mar_clk = 1; w.pc_inc = 1; w.upc_inc = 1; return w;
  endfunction
  function automatic uinstr_t w_mem_read();             // memory byte onto the bus
    uinstr_t w = '0; w.mem_rd = 1; w.io_m_n = 1; w.mbr_int_oe = 1; return w;
  endfunction
  function automatic uinstr_t w_done(input uinstr_t w);  // end of routine
    w.cond_sel = COND_ALWAYS; return w;
  endfunction
  function automatic uinstr_t w_alu(input alu_fn_e f);
    uinstr_t w = '0; w.alu_fn = f; return w_done(w);
  endfunction

  // Builds the 512-word microprogram.
  function automatic void build_ucode(ref logic [30:0] cs [512]);
    uinstr_t w;
    foreach (cs[i]) cs[i] = '0;                         // unused words hold (halt)
    cs[A_FETCH] = w_fetch_addr();
    w = w_mem_read(); w.ir_clk = 1; w.upc_load = 1; cs[1] = w;
    w = '0; w.rdec_en = 1; w.wdec_en = 1; cs[A_MOV] = w_done(w);
    w = '0; w.rdec_en = 1; w.t_clk = 1; w.upc_inc = 1; cs[A_ADD] = w; cs[A_SUB] = w; cs[A_ADC] = w;
    cs[A_ADD + 1] = w_alu(ALU_ADD);
    cs[A_SUB + 1] = w_alu(ALU_SUB);
    w = '0; w.alu_fn = ALU_ADD; w.carry_fwd = 1; cs[A_ADC + 1] = w_done(w);
    cs[A_MVI] = w_fetch_addr();
    w = w_mem_read(); w.wdec_en = 1; cs[A_MVI + 1] = w_done(w);
    w = '0; w.mar_sel = MAR_HL; w.mar_clk = 1; w.upc_inc = 1;
    cs[A_OUT] = w; cs[A_IN] = w; cs[A_STM] = w; cs[A_LDM] = w;
    w = '0; w.rdec_en = 1; w.mbr_ext_oe = 1; w.mem_wr = 1; w.io_m_n = 0; cs[A_OUT + 1] = w_done(w);
    w = '0; w.mem_rd = 1; w.io_m_n = 0; w.mbr_int_oe = 1; w.wdec_en = 1; cs[A_IN + 1] = w_done(w);
    w = '0; w.rdec_en = 1; w.mbr_ext_oe = 1; w.mem_wr = 1; w.io_m_n = 1;
    cs[A_STM + 1] = w_done(w); cs[A_STSP + 1] = w_done(w);
    w = w_mem_read(); w.wdec_en = 1; cs[A_LDM + 1] = w_done(w);
    // JNZ: skip the operand and return when Z is set
    w = w_fetch_addr(); w.cond_sel = COND_ZERO; cs[A_JNZ] = w;
    w = w_mem_read(); w.pcl_clk = 1; w.upc_inc = 1; cs[A_JNZ + 1] = w;
    w = '0; w.pch_clk = 1; cs[A_JNZ + 2] = w_done(w);     // nothing on the bus: PCH <- 0
    cs[A_LDSP] = w_fetch_addr();
    w = w_mem_read(); w.spl_clk = 1; w.upc_inc = 1; cs[A_LDSP + 1] = w;
    cs[A_LDSP + 2] = w_fetch_addr();
    w = w_mem_read(); w.sph_clk = 1; cs[A_LDSP + 3] = w_done(w);
    w = '0; w.mar_sel = MAR_SP; w.mar_clk = 1; w.upc_inc = 1; cs[A_STSP] = w;
    cs[A_HLT] = '0;
    cs[A_DCR] = w_alu(ALU_DEC);
    cs[A_INR] = w_alu(ALU_INC);
    cs[A_RRC] = w_alu(ALU_ROR);
    cs[A_RLC] = w_alu(ALU_ROL);
    cs[A_CMA] = w_alu(ALU_NOT);
    cs[A_CLR] = w_alu(ALU_CLR);
    // two-stage variants with the next fetch built in
    w = w_fetch_addr(); w.rdec_en = 1; w.wdec_en = 1; cs[A_MOVP] = w;
    w = w_mem_read(); w.ir_clk = 1; w.upc_load = 1; cs[A_MOVP + 1] = w;
    cs[A_ADDP] = w_fetch_addr();
    w = w_mem_read(); w.ir_clk = 1; w.upc_inc = 1; cs[A_ADDP + 1] = w;  // next op into the pipe
    w = '0; w.rdec_en = 1; w.t_clk = 1; w.upc_inc = 1; cs[A_ADDP + 2] = w; // IR still holds ADD
    w = '0; w.alu_fn = ALU_ADD; w.upc_load = 1; cs[A_ADDP + 3] = w;
    w = w_fetch_addr(); w.alu_fn = ALU_DEC; cs[A_DCRP] = w;
    w = w_mem_read(); w.ir_clk = 1; w.upc_load = 1; cs[A_DCRP + 1] = w;
    // JNZD: Z set -> leave through the fetch, which runs the delay slot
    w = w_fetch_addr(); w.cond_sel = COND_ZERO; cs[A_JNZD] = w;
    w = w_mem_read(); w.pcl_clk = 1; w.mar_sel = MAR_PC; w.mar_clk = 1; w.upc_inc = 1;
    cs[A_JNZD + 1] = w;                                 // PCL <- target, MAR <- slot
    w = w_mem_read(); w.ir_clk = 1; w.upc_load = 1; cs[A_JNZD + 2] = w;  // run the slot
  endfunction

  // Decoder table; overlapped = 1 maps MOV and ADD to the two-stage variants.
  function automatic logic [8:0] decode(input logic [7:0] op, input bit overlapped);
    case (op)
      8'h00: return 9'(A_FETCH);
      8'h76: return 9'(A_HLT);
      8'h77: return 9'(A_STM);
      8'h7E: return 9'(A_LDM);
      8'hE7: return 9'(A_OUT);
      8'hFE: return 9'(A_IN);
      8'hC2: return 9'(A_JNZ);
      8'h31: return 9'(A_LDSP);
      8'hF7: return 9'(A_STSP);
      8'h3D: return 9'(A_DCR);
      8'h3C: return 9'(A_INR);
      8'h0F: return 9'(A_RRC);
      8'h07: return 9'(A_RLC);
      8'h2F: return 9'(A_CMA);
      8'hAF: return 9'(A_CLR);
      default: ;
    endcase
    if (op[7:6] == 2'b01)                    return 9'(overlapped ? A_MOVP : A_MOV);
    if (op[7:3] == 5'b10000)                 return 9'(overlapped ? A_ADDP : A_ADD);
    if (op[7:3] == 5'b10001)                 return 9'(A_ADC);
    if (op[7:3] == 5'b10010)                 return 9'(A_SUB);
    if (op[7:6] == 2'b00 && op[2:0] == 3'b110) return 9'(A_MVI);
    return 9'(A_HLT);
  endfunction

  // Two-stage table: the overlapped table plus DCR with the next fetch built
  // in and the delayed branch JNZD.
  function automatic logic [8:0] decode_two(input logic [7:0] op);
    if (op == 8'h3D) return 9'(A_DCRP);
    if (op == 8'hC4) return 9'(A_JNZD);
    return decode(op, 1'b1);
  endfunction

  // Program A: 7 x 5 by repeated addition, output, input, memory and stack
  // accesses, add with carry. Uses multi-byte instructions.
  localparam int PROG_A_LEN = 40;
  localparam logic [7:0] PROG_A [PROG_A_LEN] = '{
    8'h06, 8'h07, 8'h0E, 8'h05, 8'h3E, 8'h00,          // MVI B,7  MVI C,5  MVI A,0
    8'h80, 8'h57, 8'h79, 8'h3D, 8'h4F, 8'h7A,          // loop: ADD B  MOV D,A  MOV A,C  DCR A  MOV C,A  MOV A,D
    8'hC2, 8'h06,                                      // JNZ loop
    8'h26, 8'h40, 8'hE7,                               // MVI H,40h  OUT
    8'h26, 8'h80, 8'hFE, 8'h90,                        // MVI H,80h  IN A  SUB B
    8'h26, 8'h12, 8'h2E, 8'h34, 8'h77,                 // MVI H,12h  MVI L,34h  MOV M,A
    8'h3E, 8'h00, 8'h7E,                               // MVI A,0  MOV A,M
    8'h31, 8'h00, 8'h20, 8'hF7,                        // LDSP 2000h  STSP
    8'h3E, 8'hFF, 8'h1E, 8'h01, 8'h83, 8'h8B,          // MVI A,FFh  MVI E,1  ADD E  ADC E
    8'h76};                                            // HLT

  // Program B: single-byte instructions only, so it also runs with the
  // three-stage decode-ahead pipe.
  localparam int PROG_B_LEN = 20;
  localparam logic [7:0] PROG_B [PROG_B_LEN] = '{
    8'h3C, 8'h0F, 8'h67, 8'hFE, 8'h47, 8'h07, 8'h80, 8'h88, 8'h4F, 8'h2F,
    8'h0F, 8'h5F, 8'hAF, 8'h3C, 8'h0F, 8'h0F, 8'h67, 8'h79, 8'hE7, 8'h76};

  // Programs C and D: the 7 x 5 loop of program A. C closes the loop with
  // JNZ; D closes it with JNZD and moves MOV A,D into the delay slot.
  localparam int PROG_C_LEN = 15, PROG_D_LEN = 15;
  localparam logic [7:0] PROG_C [PROG_C_LEN] = '{
    8'h06, 8'h07, 8'h0E, 8'h05, 8'h3E, 8'h00,          // MVI B,7  MVI C,5  MVI A,0
    8'h80, 8'h57, 8'h79, 8'h3D, 8'h4F, 8'h7A,          // loop: ADD B  MOV D,A  MOV A,C  DCR A  MOV C,A  MOV A,D
    8'hC2, 8'h06, 8'h76};                              // JNZ loop  HLT
  localparam logic [7:0] PROG_D [PROG_D_LEN] = '{
    8'h06, 8'h07, 8'h0E, 8'h05, 8'h3E, 8'h00,          // MVI B,7  MVI C,5  MVI A,0
    8'h80, 8'h57, 8'h79, 8'h3D, 8'h4F,                 // loop: ADD B  MOV D,A  MOV A,C  DCR A  MOV C,A
    8'hC4, 8'h06, 8'h7A, 8'h76};                       // JNZD loop  (slot: MOV A,D)  HLT
endpackage
