// tb_imem: self-checking test of the instruction memory: fills every word
// through the write port, then reads all back in random order.
module tb_imem;
  logic        clk = 0, we = 0;
  logic [7:0]  waddr = '0, raddr = '0;
  logic [23:0] wdata = '0, rdata;
  logic [23:0] shadow [256];
  int          checks = 0, failures = 0;

  imem #(.DEPTH(256), .WIDTH(24)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we = 1; waddr = 8'(i); wdata = 24'($urandom); shadow[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    repeat (600) begin
      raddr = 8'($urandom); #1;
      checks++;
      if (rdata !== shadow[raddr]) begin
        failures++; $display("FAIL imem[%0d]=%h exp %h", raddr, rdata, shadow[raddr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
