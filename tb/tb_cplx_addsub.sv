// tb_cplx_addsub: self-checking test of the shared complex adder/subtractor.
// Checks the published CADD/CSUB example (8965+j4523, 3578+j7412) and random
// operands against a 64-bit reference computed in the testbench.
module tb_cplx_addsub;
  import asip_pkg::*;

  cplx_t a, b, y;
  logic  sub;
  int    checks = 0, failures = 0;

  cplx_addsub dut (.a(a), .b(b), .sub(sub), .y(y));

  task automatic check(input longint ar, ai, br, bi, input logic s);
    longint er, ei;
    a = '{re: 32'(ar), im: 32'(ai)};
    b = '{re: 32'(br), im: 32'(bi)};
    sub = s;
    #1;
    er = s ? ar - br : ar + br;
    ei = s ? ai - bi : ai + bi;
    checks++;
    if (y.re !== 32'(er) || y.im !== 32'(ei)) begin
      failures++;
      $display("FAIL sub=%0d (%0d,%0d)op(%0d,%0d) got (%0d,%0d) exp (%0d,%0d)",
               s, ar, ai, br, bi, y.re, y.im, 32'(er), 32'(ei));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // published results: CADD = 12543_11935, CSUB = 5387_-2889
    check(8965, 4523, 3578, 7412, 1'b0);
    if (y.re !== 32'sd12543 || y.im !== 32'sd11935) failures++;
    checks++;
    check(8965, 4523, 3578, 7412, 1'b1);
    if (y.re !== 32'sd5387 || y.im !== -32'sd2889) failures++;
    checks++;
    repeat (200) begin
      check(longint'(signed'($urandom)), longint'(signed'($urandom)),
            longint'(signed'($urandom)), longint'(signed'($urandom)), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
