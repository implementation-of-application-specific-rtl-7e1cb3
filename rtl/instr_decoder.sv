// instr_decoder: decodes a 24-bit instruction into the pipeline's control word.
//
// Format, as in the base ADD instruction: [23:16] opcode, [15:12] r,
// [11:8] s, [7:4] t, [3:0] sub-opcode. ADD (opcode 1000_0000) is the base
// instruction whose layout the original design shows; the remaining opcodes are this
// design's encoding of the Mandelbrot instruction set (CADD, CSUB, CMUL,
// CSQU, LDA16/32/64, STA16/32/64, MOV, MOVE) and of MOVI, which loads an
// 8-bit immediate ({s,t}) into an AR register. An unknown opcode or a
// non-zero sub-opcode decodes to an invalid (no-operation) control word.
// CADD and CSUB differ only in the `sub` bit, CMUL and CSQU only in `square`,
// so each pair drives one shared datapath.
//
// Purely combinational; used in the register-read stage.
module instr_decoder
  import asip_pkg::*;
(
  input  logic [ILEN-1:0] instr,
  output ctrl_t           ctrl
);

  logic [7:0]      opc;
  logic [3:0]      sub_op;

  always_comb begin
    opc    = instr[23:16];
    sub_op = instr[3:0];

    ctrl         = '0;
    ctrl.res_sel = RES_NONE;
    ctrl.size    = SZ_64;
    ctrl.rd      = instr[15:12];
    ctrl.rs      = instr[11:8];
    ctrl.rt      = instr[7:4];
    ctrl.imm8    = instr[11:4];

    if (sub_op == 4'b0000) begin
      ctrl.valid = 1'b1;
      unique case (opc)
        OP_ADD:  begin ctrl.res_sel = RES_AR_ADD; ctrl.ar_we = 1'b1;
                       ctrl.rs_ar = 1'b1; ctrl.rt_ar = 1'b1; end
        OP_MOVI: begin ctrl.res_sel = RES_AR_IMM; ctrl.ar_we = 1'b1; end
        OP_CADD, OP_CSUB: begin
                       ctrl.res_sel = RES_CR_ADDSUB; ctrl.cr_we = 1'b1;
                       ctrl.sub = opc[0];
                       ctrl.rs_cr = 1'b1; ctrl.rt_cr = 1'b1; end
        OP_CMUL: begin ctrl.res_sel = RES_CR_MUL; ctrl.cr_we = 1'b1;
                       ctrl.rs_cr = 1'b1; ctrl.rt_cr = 1'b1; end
        OP_CSQU: begin ctrl.res_sel = RES_CR_MUL; ctrl.cr_we = 1'b1;
                       ctrl.square = 1'b1; ctrl.rs_cr = 1'b1; end
        OP_LDA16, OP_LDA32, OP_LDA64: begin
                       ctrl.res_sel = RES_CR_LOAD; ctrl.cr_we = 1'b1; ctrl.load = 1'b1;
                       ctrl.rs_ar = 1'b1;
                       ctrl.size = (opc == OP_LDA16) ? SZ_16 :
                                   (opc == OP_LDA32) ? SZ_32 : SZ_64; end
        OP_STA16, OP_STA32, OP_STA64: begin
                       ctrl.store = 1'b1; ctrl.rs_ar = 1'b1; ctrl.rr_cr = 1'b1;
                       ctrl.size = (opc == OP_STA16) ? SZ_16 :
                                   (opc == OP_STA32) ? SZ_32 : SZ_64; end
        OP_MOV:  begin ctrl.res_sel = RES_CR_MOV; ctrl.cr_we = 1'b1;
                       ctrl.rs_ar = 1'b1; ctrl.rt_ar = 1'b1; end
        OP_MOVE: begin ctrl.res_sel = RES_CR_MOVE; ctrl.cr_we = 1'b1;
                       ctrl.rs_cr = 1'b1; end
        default: ctrl.valid = 1'b0;
      endcase
    end
  end

endmodule
