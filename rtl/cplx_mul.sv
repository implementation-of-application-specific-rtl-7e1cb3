// cplx_mul: the shared complex multiplier of the CMUL and CSQU instructions.
//
// (a.re + j a.im)(b.re + j b.im) = (a.re*b.re - a.im*b.im) + j(a.re*b.im + a.im*b.re).
// CSQU squares its single operand on the same four multipliers by routing a
// to the second operand, so that its imaginary part becomes 2*a.re*a.im.
// The 64-bit products are truncated to the low 32 bits of each component
// (two's-complement wrap), this design's choice; the original design's test values
// all fit in 32 bits.
//
// Interface: a, b complex operands; square = 1 ignores b and returns a*a.
// Purely combinational; used in the execute stage.
module cplx_mul
  import asip_pkg::*;
(
  input  cplx_t a,
  input  cplx_t b,
  input  logic  square,
  output cplx_t y
);

  cplx_t                   bb;
  logic signed [2*XLEN-1:0] p_rr, p_ii, p_ri, p_ir;

  always_comb begin
    bb   = square ? a : b;
    p_rr = a.re * bb.re;
    p_ii = a.im * bb.im;
    p_ri = a.re * bb.im;
    p_ir = a.im * bb.re;
    y.re = XLEN'(p_rr - p_ii);
    y.im = XLEN'(p_ri + p_ir);
  end

endmodule
