// tb_cplx_mul: self-checking test of the shared complex multiplier.
// Checks the published CMUL and CSQU examples and random operands against a
// reference computed with 64-bit arithmetic and truncated to 32 bits.
module tb_cplx_mul;
  import asip_pkg::*;

  cplx_t a, b, y;
  logic  square;
  int    checks = 0, failures = 0;

  cplx_mul dut (.a(a), .b(b), .square(square), .y(y));

  task automatic check(input longint ar, ai, br, bi, input logic sq);
    longint er, ei, xr, xi;
    a = '{re: 32'(ar), im: 32'(ai)};
    b = '{re: 32'(br), im: 32'(bi)};
    square = sq;
    #1;
    // operands as the 32-bit values the block sees
    xr = longint'(a.re); xi = longint'(a.im);
    if (sq) begin
      er = xr * xr - xi * xi;
      ei = 2 * xr * xi;
    end else begin
      er = xr * longint'(b.re) - xi * longint'(b.im);
      ei = xr * longint'(b.im) + xi * longint'(b.re);
    end
    checks++;
    if (y.re !== 32'(er) || y.im !== 32'(ei)) begin
      failures++;
      $display("FAIL sq=%0d got (%0d,%0d) exp (%0d,%0d)", sq, y.re, y.im, 32'(er), 32'(ei));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // published: CMUL = -1447706_82631874, CSQU(8965_4523) = 59913696_81097390
    check(8965, 4523, 3578, 7412, 1'b0);
    checks++;
    if (y.re !== -32'sd1447706 || y.im !== 32'sd82631874) failures++;
    check(8965, 4523, 3578, 7412, 1'b1);
    checks++;
    if (y.re !== 32'sd59913696 || y.im !== 32'sd81097390) failures++;
    // published Mandelbrot example values: (5)^2 = 25, (-1)^2 = 1
    check(5, 0, 0, 0, 1'b1);
    check(-1, 0, 0, 0, 1'b1);
    repeat (100) begin  // 16-bit operands: no wrap
      check(longint'($signed(16'($urandom))), longint'($signed(16'($urandom))),
            longint'($signed(16'($urandom))), longint'($signed(16'($urandom))), 1'($urandom));
    end
    repeat (100) begin  // full 32-bit operands: wrapping products
      check(longint'(signed'($urandom)), longint'(signed'($urandom)),
            longint'(signed'($urandom)), longint'(signed'($urandom)), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
