// tb_dmem: self-checking test of the data memory. Random 16/32/64-bit writes
// and reads at random addresses are compared with a byte-array shadow
// (little-endian, naturally aligned accesses).
module tb_dmem;
  import asip_pkg::*;

  logic        clk = 0, we = 0;
  word_t       addr = '0;
  msize_e      size = SZ_64;
  logic [63:0] wdata = '0, rdata;
  byte unsigned shadow [256];
  int          checks = 0, failures = 0;

  dmem #(.BYTES(256)) dut (.clk, .we, .addr, .size, .wdata, .rdata);

  always #5 clk = ~clk;

  function automatic int nbytes(msize_e s);
    return (s == SZ_16) ? 2 : (s == SZ_32) ? 4 : 8;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // clear through 64-bit writes
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      we = 1; size = SZ_64; addr = word_t'(8 * i); wdata = '0;
    end
    foreach (shadow[i]) shadow[i] = 0;
    repeat (2000) begin
      int n, base;
      logic [63:0] exp;
      @(negedge clk);
      case ($urandom % 3)
        0: size = SZ_16;
        1: size = SZ_32;
        default: size = SZ_64;
      endcase
      n     = nbytes(size);
      addr  = word_t'($urandom % 256);
      wdata = {$urandom, $urandom};
      we    = 1'($urandom);
      base  = int'(addr) & ~(n - 1);
      #1;
      exp = '0;
      for (int i = n - 1; i >= 0; i--) exp = (exp << 8) | 64'(shadow[base + i]);
      checks++;
      if (rdata !== exp) begin
        failures++;
        $display("FAIL read size %0d at %0d: %h exp %h", n, addr, rdata, exp);
      end
      @(posedge clk);
      if (we) for (int i = 0; i < n; i++) shadow[base + i] = 8'(wdata >> (8 * i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
