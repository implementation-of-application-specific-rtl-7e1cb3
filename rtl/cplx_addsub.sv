// cplx_addsub: the shared complex adder/subtractor of the CADD and CSUB
// instructions.
//
// Both instructions run on one datapath: one adder per component whose second
// operand is inverted, with the carry-in set, when `sub` is high. Sharing one
// datapath between addition and subtraction is the original design's area
// optimisation; the invert-and-carry form of the sharing is this design's.
// Components are 32-bit two's complement and wrap on overflow (no
// saturation), which is this design's choice.
//
// Interface: a, b complex operands; sub = 0 gives a + b (CADD), 1 gives a - b
// (CSUB). Purely combinational; the result is used in the execute stage.
module cplx_addsub
  import asip_pkg::*;
(
  input  cplx_t a,
  input  cplx_t b,
  input  logic  sub,
  output cplx_t y
);

  logic [XLEN-1:0] b_re_op, b_im_op;

  always_comb begin
    b_re_op = sub ? ~b.re : b.re;
    b_im_op = sub ? ~b.im : b.im;
    y.re    = a.re + b_re_op + XLEN'(sub);
    y.im    = a.im + b_im_op + XLEN'(sub);
  end

endmodule
