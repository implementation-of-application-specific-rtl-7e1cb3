// tie_exec: execute-stage unit of the Mandelbrot instruction set.
//
// Given the decoded control word and the (already bypassed) operands, it
// produces the AR result (ADD, MOVI), the CR result (CADD/CSUB through the
// shared cplx_addsub, CMUL/CSQU through the shared cplx_mul, MOV, MOVE), the
// data-memory byte address of a load or store, and the store data.
// Addressing is this design's choice: address = AR[s] + t * access size, so
// the 4-bit t field is an offset scaled to 2, 4 or 8 bytes. Store data is
// right-aligned: STA16 stores CR[r].re[15:0], STA32 the packed pair
// {re[15:0], im[15:0]}, STA64 the whole register {re, im}.
//
// Purely combinational.
module tie_exec
  import asip_pkg::*;
(
  input  ctrl_t            ctrl,
  input  word_t            ar_s,      // AR[s]
  input  word_t            ar_t,      // AR[t]
  input  cplx_t            cr_s,      // CR[s]
  input  cplx_t            cr_t,      // CR[t]
  input  cplx_t            cr_r,      // CR[r] (store data)
  output word_t            ar_res,
  output cplx_t            cr_res,
  output word_t            mem_addr,
  output logic [CLEN-1:0]  mem_wdata
);

  cplx_t addsub_y, mul_y;

  cplx_addsub u_addsub (.a(cr_s), .b(cr_t), .sub(ctrl.sub), .y(addsub_y));
  cplx_mul    u_mul    (.a(cr_s), .b(cr_t), .square(ctrl.square), .y(mul_y));

  always_comb begin
    ar_res = '0;
    cr_res = '0;
    unique case (ctrl.res_sel)
      RES_AR_ADD:    ar_res = ar_s + ar_t;
      RES_AR_IMM:    ar_res = word_t'(signed'(ctrl.imm8));
      RES_CR_ADDSUB: cr_res = addsub_y;
      RES_CR_MUL:    cr_res = mul_y;
      RES_CR_MOV:    cr_res = '{re: ar_s, im: ar_t};
      RES_CR_MOVE:   cr_res = cr_s;
      default:       ;
    endcase

    mem_addr = ar_s + (word_t'(ctrl.rt) << ctrl.size);

    unique case (ctrl.size)
      SZ_16:   mem_wdata = CLEN'(cr_r.re[15:0]);
      SZ_32:   mem_wdata = CLEN'({cr_r.re[15:0], cr_r.im[15:0]});
      default: mem_wdata = cr_r;
    endcase
  end

endmodule
