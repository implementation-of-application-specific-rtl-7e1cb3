// tb_regfile: self-checking test of the register file at the CR width (64
// bits). Checks reset to zero, random writes against a shadow array, both
// read ports, and write-through of a same-cycle write.
module tb_regfile;
  logic        clk = 0, rst_n = 0, we = 0;
  logic [3:0]  waddr = '0, ra = '0, rb = '0;
  logic [63:0] wdata = '0, da, db;
  logic [63:0] shadow [16];
  int          checks = 0, failures = 0;

  regfile #(.WIDTH(64), .DEPTH(16)) dut (
    .clk, .rst_n, .we, .waddr, .wdata,
    .raddr_a(ra), .rdata_a(da), .raddr_b(rb), .rdata_b(db)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (shadow[i]) shadow[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      ra = 4'(i); rb = 4'(15 - i); #1;
      checks++;
      if (da !== 64'd0 || db !== 64'd0) failures++;
    end
    repeat (500) begin
      @(negedge clk);
      we    = 1'($urandom);
      waddr = 4'($urandom);
      wdata = {$urandom, $urandom};
      ra    = 4'($urandom);
      rb    = ($urandom % 4 == 0) ? waddr : 4'($urandom);
      #1;
      checks++;
      if (da !== ((we && waddr == ra) ? wdata : shadow[ra]) ||
          db !== ((we && waddr == rb) ? wdata : shadow[rb])) begin
        failures++;
        $display("FAIL ra=%0d rb=%0d da=%h db=%h", ra, rb, da, db);
      end
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
