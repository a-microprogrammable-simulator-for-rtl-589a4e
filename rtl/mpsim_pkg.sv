// Shared types and constants of the microprogrammed 8-bit machine.
//
// The 31-bit microinstruction is one control bit (or small field) per
// hardware action, all active high. Bit positions follow the machine's bit
// assignment table; the packed struct below lists the fields from bit 30
// down to bit 0 so that casting a 31-bit word to uinstr_t lines every field
// up with its bit number. Multi-bit fields take their lowest bit number as
// the least significant bit (a choice of this design).
//
// The ALU function codes are this design's own choice: the source material
// names a 16-function ALU but does not list the functions.
package mpsim_pkg;

  localparam int unsigned UW      = 31;   // microinstruction width
  localparam int unsigned UPC_W   = 9;    // microprogram address width
  localparam int unsigned CS_DEPTH = 512; // control store words
  localparam int unsigned AW      = 16;   // address bus width
  localparam int unsigned DW      = 8;    // data bus width

  // Register codes of the IR source / destination fields.
  localparam logic [2:0] R_B = 3'd0, R_C = 3'd1, R_D = 3'd2, R_E = 3'd3,
                         R_H = 3'd4, R_L = 3'd5, R_NONE = 3'd6, R_A = 3'd7;

  // Condition that resets the microprogram counter (8:1 mux inputs).
  typedef enum logic [2:0] {
    COND_NEVER  = 3'd0,
    COND_ALWAYS = 3'd1,
    COND_CARRY  = 3'd2,
    COND_ZERO   = 3'd3,
    COND_SIGN   = 3'd4,
    COND_PARITY = 3'd5,
    COND_RSV6   = 3'd6,
    COND_RSV7   = 3'd7
  } cond_e;

  // Source of the memory address register.
  typedef enum logic [1:0] {
    MAR_NONE = 2'd0,
    MAR_PC   = 2'd1,
    MAR_SP   = 2'd2,
    MAR_HL   = 2'd3
  } mar_sel_e;

  // ALU functions (this design's assignment).
  typedef enum logic [3:0] {
    ALU_NOP  = 4'd0,   // nothing written
    ALU_ADD  = 4'd1,   // A <- A + T + cin
    ALU_SUB  = 4'd2,   // A <- A - T - cin
    ALU_AND  = 4'd3,
    ALU_OR   = 4'd4,
    ALU_XOR  = 4'd5,
    ALU_NOT  = 4'd6,   // A <- ~A
    ALU_INC  = 4'd7,   // A <- A + 1
    ALU_DEC  = 4'd8,   // A <- A - 1
    ALU_ROL  = 4'd9,   // rotate left (through carry when cin forwarding is on)
    ALU_ROR  = 4'd10,  // rotate right (through carry when cin forwarding is on)
    ALU_PASS = 4'd11,  // A <- T
    ALU_CMP  = 4'd12,  // flags of A - T, A unchanged
    ALU_NEG  = 4'd13,  // A <- -A
    ALU_CLR  = 4'd14,  // A <- 0
    ALU_SWAP = 4'd15   // swap nibbles of A
  } alu_fn_e;

  // Pipeline mode.
  typedef enum logic [1:0] {
    MODE_NONE   = 2'd0,   // fetch and execute not overlapped
    MODE_TWO    = 2'd1,   // fetch / execute
    MODE_THREE  = 2'd2    // fetch / decode / execute
  } mode_e;

  // Flag bits, packed {P, S, Z, C}.
  typedef struct packed {
    logic p;
    logic s;
    logic z;
    logic c;
  } flags_t;

  // The microinstruction, bit 30 first.
  typedef struct packed {
    logic       io_m_n;     // 30: 1 memory, 0 I/O
    logic       mem_wr;     // 29
    logic       mem_rd;     // 28
    logic       mar_clk;    // 27
    logic [1:0] mar_sel;    // 26:25
    logic       pc_inc;     // 24
    logic       pcl_clk;    // 23
    logic       pch_clk;    // 22
    logic       pcl_oe;     // 21
    logic       pch_oe;     // 20
    logic       spl_clk;    // 19
    logic       sph_clk;    // 18
    logic       spl_oe;     // 17
    logic       sph_oe;     // 16
    logic       wdec_en;    // 15: clock register named by IR[5:3]
    logic       rdec_en;    // 14: register named by IR[2:0] onto the bus
    logic       mbr_int_oe; // 13
    logic       mbr_ext_oe; // 12
    logic       t_clk;      // 11
    logic [3:0] alu_fn;     // 10:7
    logic [2:0] cond_sel;   // 6:4
    logic       carry_fwd;  // 3
    logic       ir_clk;     // 2
    logic       upc_load;   // 1
    logic       upc_inc;    // 0
  } uinstr_t;

  // Even parity flag as on the 8080: 1 when the number of ones is even.
  function automatic logic even_parity(input logic [7:0] v);
    return ~^v;
  endfunction

endpackage
