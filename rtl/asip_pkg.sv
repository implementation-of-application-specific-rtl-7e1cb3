// asip_pkg: shared types and constants of the Mandelbrot ASIP.
//
// Instructions are 24 bits wide, laid out as in the base ADD format:
//   [23:16] opcode, [15:12] r, [11:8] s, [7:4] t, [3:0] sub-opcode (always 0000).
// ADD keeps its base opcode 1000_0000. The opcodes of the Mandelbrot
// extension (CADD ... MOVE) and of MOVI are this design's own choice.
// A complex value in the CR register file is 64 bits: real part in [63:32],
// imaginary part in [31:0], each a 32-bit two's-complement integer.
package asip_pkg;

  localparam int unsigned ILEN    = 24;  // instruction width
  localparam int unsigned XLEN    = 32;  // AR register width / complex component width
  localparam int unsigned CLEN    = 64;  // CR register width (one complex value)
  localparam int unsigned NREGS   = 16;  // 4-bit register fields address 16 registers
  localparam int unsigned RIDX    = 4;

  typedef logic [XLEN-1:0] word_t;

  typedef struct packed {
    logic signed [XLEN-1:0] re;
    logic signed [XLEN-1:0] im;
  } cplx_t;

  typedef enum logic [7:0] {
    OP_ADD   = 8'h80,  // AR[r] <- AR[s] + AR[t]
    OP_MOVI  = 8'h81,  // AR[r] <- sign-extended 8-bit immediate {s,t}
    OP_CADD  = 8'h60,  // CR[r] <- CR[s] + CR[t]
    OP_CSUB  = 8'h61,  // CR[r] <- CR[s] - CR[t]
    OP_CMUL  = 8'h62,  // CR[r] <- CR[s] * CR[t]
    OP_CSQU  = 8'h63,  // CR[r] <- CR[s] * CR[s]
    OP_LDA16 = 8'h64,  // CR[r] <- {sext(mem16[AR[s]+2t]), 0}
    OP_LDA32 = 8'h65,  // CR[r] <- {sext(mem32[..][31:16]), sext(mem32[..][15:0])}
    OP_LDA64 = 8'h66,  // CR[r] <- mem64[AR[s]+8t]
    OP_STA16 = 8'h67,  // mem16[AR[s]+2t] <- CR[r].re[15:0]
    OP_STA32 = 8'h68,  // mem32[AR[s]+4t] <- {CR[r].re[15:0], CR[r].im[15:0]}
    OP_STA64 = 8'h69,  // mem64[AR[s]+8t] <- CR[r]
    OP_MOV   = 8'h6A,  // CR[r] <- {AR[s], AR[t]}
    OP_MOVE  = 8'h6B   // CR[r] <- CR[s]
  } opcode_e;

  // Which result the execute stage produces.
  typedef enum logic [2:0] {
    RES_NONE,
    RES_AR_ADD,
    RES_AR_IMM,
    RES_CR_ADDSUB,
    RES_CR_MUL,
    RES_CR_MOV,
    RES_CR_MOVE,
    RES_CR_LOAD
  } res_sel_e;

  // Memory access size.
  typedef enum logic [1:0] {
    SZ_16 = 2'd1,
    SZ_32 = 2'd2,
    SZ_64 = 2'd3
  } msize_e;

  // Decoded control word, carried down the pipeline.
  typedef struct packed {
    logic             valid;     // a legal instruction
    res_sel_e         res_sel;
    logic             ar_we;     // writes AR[rd]
    logic             cr_we;     // writes CR[rd]
    logic             sub;       // CSUB on the shared adder/subtractor
    logic             square;    // CSQU on the shared multiplier
    logic             load;
    logic             store;
    msize_e           size;
    logic             rs_ar;     // reads AR[s]
    logic             rt_ar;     // reads AR[t]
    logic             rs_cr;     // reads CR[s]
    logic             rt_cr;     // reads CR[t]
    logic             rr_cr;     // reads CR[r] (store data)
    logic [RIDX-1:0]  rd;
    logic [RIDX-1:0]  rs;
    logic [RIDX-1:0]  rt;
    logic [7:0]       imm8;      // {s,t}
  } ctrl_t;

endpackage
