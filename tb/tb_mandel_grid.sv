// tb_mandel_grid: Mandelbrot-set workload on the whole ASIP at default sizes.
//
// For every Gaussian-integer point c = a + bj with a in -3..1 and b in -2..2
// the host writes c to data address 0 and runs one fixed program of unrolled
// iterations z <- z*z + c (CSQU, CADD, STA64 per iteration, 8 iterations)
// from z = 0. The host then reads the stored iterates, checks each against
// the instruction-level reference model, and classifies the point: it has
// escaped once an iterate has |z|^2 > 4 (the instruction set has no compare,
// so the escape test is the host's). The known members among these points
// (c = 0, -1, -2, j, -j) must stay bounded and the others must escape.
// A character map of the grid is printed ('#' member, '.' escaped).
module tb_mandel_grid;
  import asip_pkg::*;
  import tb_asm_pkg::*;

  localparam int ITER = 8;

  logic        clk = 0, rst_n = 0, run = 0;
  logic        prog_we = 0;
  logic [7:0]  prog_addr = '0;
  logic [23:0] prog_data = '0;
  logic        host_we = 0;
  logic [31:0] host_addr = '0;
  logic [63:0] host_wdata = '0, host_rdata;
  logic        retire, busy, evt_stall, evt_bypass_m, evt_bypass_w;

  int checks = 0, failures = 0;

  asip_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [23:0] p [$];

  initial begin
    int total_cycles = 0;
    string row;
    // program: c at byte 0, z_1..z_ITER stored from byte 64
    p.push_back(enc_movi(2, 64));
    p.push_back(enc(OP_LDA64, 1, 0, 0));   // CR1 = c
    p.push_back(enc(OP_CSUB, 0, 1, 1));    // CR0 = 0
    for (int n = 0; n < ITER; n++) begin
      p.push_back(enc(OP_CSQU, 0, 0, 0));
      p.push_back(enc(OP_CADD, 0, 0, 1));
      p.push_back(enc(OP_STA64, 0, 2, n));
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (p[i]) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 8'(i); prog_data = p[i];
    end
    @(negedge clk);
    prog_we = 1; prog_addr = 8'(p.size()); prog_data = '0;
    @(negedge clk);
    prog_we = 0;

    for (int b = 2; b >= -2; b--) begin
      row = "";
      for (int a = -3; a <= 1; a++) begin
        iss_model m = new();
        int fetched, cyc;
        logic escaped;
        // write c
        @(negedge clk);
        host_we = 1; host_addr = 0; host_wdata = {32'(a), 32'(b)};
        @(negedge clk);
        host_we = 0;
        m.wr(0, 8, longint'({32'(a), 32'(b)}));
        foreach (p[i]) m.step(p[i]);
        // restart from PC 0 and run
        rst_n = 0;
        @(negedge clk);
        rst_n = 1;
        fetched = 0; cyc = 0;
        while (fetched < p.size() || busy) begin
          run = (fetched < p.size());
          #1;
          if (run && !evt_stall) fetched++;
          @(negedge clk);
          cyc++;
        end
        run = 0;
        total_cycles += cyc;
        // read back and classify
        escaped = 1'b0;
        for (int n = 0; n < ITER; n++) begin
          longint zr, zi;
          logic [63:0] exp;
          host_addr = 64 + 8 * n;
          #1;
          exp = m.rd(64 + 8 * n, 8);
          chk($sformatf("c=(%0d,%0d) z%0d", a, b, n + 1), host_rdata === exp);
          zr = longint'(signed'(host_rdata[63:32]));
          zi = longint'(signed'(host_rdata[31:0]));
          // only the iterates before the first escape are meaningful
          if (!escaped && zr * zr + zi * zi > 4) escaped = 1'b1;
        end
        chk($sformatf("membership of c=(%0d,%0d)", a, b),
            escaped == !((b == 0 && a inside {0, -1, -2}) || (a == 0 && b inside {1, -1})));
        row = {row, escaped ? "." : "#"};
      end
      $display("  Im=%2d  %s", b, row);
    end
    $display("  25 points, %0d instructions each, %0d cycles in all", p.size(), total_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
