// tb_asip_top: end-to-end test of the whole ASIP at its default sizes.
//
// Programs are loaded through the program port, operands through the host
// data port, and results read back the same way after the pipeline drains.
//  1. The four arithmetic instructions on the published example operands
//     (8965+j4523, 3578+j7412), expecting CADD 12543+j11935,
//     CSUB 5387-j2889, CMUL -1447706+j82631874, CSQU 59913696+j81097390,
//     with operands loaded and results stored at all three widths.
//     Also the register usage of the worked examples ADD a4, a2, a5
//     and CADD c4, c3, c1.
//  2. Unrolled Mandelbrot iterations z <- z*z + c from z = 0, storing each z:
//     c = 1 must give 1, 2, 5, 26, ... and c = -1 must give -1, 0, -1, 0, ...
//     (then wrap-around values from the reference model), plus complex c.
//  3. Timing: a lone instruction writes back 4 cycles after it is fetched,
//     and a program of N instructions takes (N - 1) + stalls + 4 cycles.
// Each pipeline mechanism (load-use stall, bypass from M, bypass from W) and
// each instruction class is counted and must occur at least once.
module tb_asip_top;
  import asip_pkg::*;
  import tb_asm_pkg::*;

  logic        clk = 0, rst_n = 0, run = 0;
  logic        prog_we = 0;
  logic [7:0]  prog_addr = '0;
  logic [23:0] prog_data = '0;
  logic        host_we = 0;
  logic [31:0] host_addr = '0;
  logic [63:0] host_wdata = '0, host_rdata;
  logic        retire, busy, evt_stall, evt_bypass_m, evt_bypass_w;

  int checks = 0, failures = 0;
  int n_stall = 0, n_byp_m = 0, n_byp_w = 0;
  int n_op [opcode_e];

  asip_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic host_write(int unsigned a, logic [63:0] d);
    @(negedge clk);
    host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic host_read(int unsigned a, output logic [63:0] d);
    @(negedge clk);
    host_addr = a;
    #1 d = host_rdata;
  endtask

  function automatic logic [63:0] cpack(longint re, longint im);
    return {32'(re), 32'(im)};
  endfunction

  // Load a program, run it to completion, return cycles first fetch..last retire.
  task automatic run_prog(logic [23:0] p [$], output int cycles, output int stalls);
    int fetched = 0, retired = 0, cyc = 0, first = -1, last = -1;
    stalls = 0;
    foreach (p[i]) begin
      opcode_e op = opcode_e'(p[i][23:16]);
      n_op[op] = n_op.exists(op) ? n_op[op] + 1 : 1;
    end
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    foreach (p[i]) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 8'(i); prog_data = p[i];
    end
    @(negedge clk);
    prog_we = 1; prog_addr = 8'(p.size()); prog_data = '0;  // end marker: no-op
    @(negedge clk);
    prog_we = 0;
    while (retired < p.size() && cyc < 1000) begin
      run = (fetched < p.size());
      #1;
      if (run && first < 0) first = cyc;
      if (run && !evt_stall) fetched++;
      if (evt_stall)    begin stalls++; n_stall++; end
      if (evt_bypass_m) n_byp_m++;
      if (evt_bypass_w) n_byp_w++;
      if (retire) begin retired++; last = cyc; end
      @(negedge clk);
      cyc++;
    end
    run = 0;
    #1;
    chk("pipeline drained", !busy);
    chk("all instructions retired", retired === p.size());
    cycles = last - first;
  endtask

  logic [23:0] p [$];
  logic [63:0] d;
  int cycles, stalls;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- 1. published instruction results ----
    host_write(0,  cpack(8965, 4523));
    host_write(8,  cpack(3578, 7412));
    host_write(16, {32'd0, 16'(8965), 16'(4523)});   // packed 16-bit pair
    host_write(24, {48'd0, 16'(3578)});              // 16-bit real
    p = {};
    p.push_back(enc_movi(1, 64));                  // result base
    p.push_back(enc(OP_LDA64, 1, 0, 0));           // CR1 = 8965+j4523
    p.push_back(enc(OP_LDA64, 2, 0, 1));           // CR2 = 3578+j7412
    p.push_back(enc(OP_CADD, 3, 1, 2));            // load-use on CR2
    p.push_back(enc(OP_CSUB, 4, 1, 2));
    p.push_back(enc(OP_CMUL, 5, 1, 2));
    p.push_back(enc(OP_CSQU, 6, 1, 0));
    p.push_back(enc(OP_STA64, 3, 1, 0));
    p.push_back(enc(OP_STA64, 4, 1, 1));
    p.push_back(enc(OP_STA64, 5, 1, 2));
    p.push_back(enc(OP_STA64, 6, 1, 3));
    p.push_back(enc(OP_LDA32, 7, 0, 4));           // CR7 = 8965+j4523 from 16-bit pair
    p.push_back(enc(OP_LDA16, 8, 0, 12));          // CR8 = 3578
    p.push_back(enc(OP_CMUL, 9, 7, 8));            // 32076770 + j16183294
    p.push_back(enc(OP_STA64, 9, 1, 4));
    p.push_back(enc(OP_STA32, 3, 1, 10));          // 12543, 11935 packed at 64+40
    p.push_back(enc(OP_STA16, 4, 0, 15));          // CSUB real part 5387 at byte 30
    run_prog(p, cycles, stalls);
    host_read(64, d);  chk("CADD 12543_11935",        d === cpack(12543, 11935));
    host_read(72, d);  chk("CSUB 5387_-2889",         d === cpack(5387, -2889));
    host_read(80, d);  chk("CMUL -1447706_82631874",  d === cpack(-1447706, 82631874));
    host_read(88, d);  chk("CSQU 59913696_81097390",  d === cpack(59913696, 81097390));
    host_read(96, d);  chk("LDA32/LDA16 then CMUL",   d === cpack(32076770, 16183294));
    host_read(104, d); chk("STA32 packed pair",       d[31:0] === {16'(12543), 16'(11935)});
    host_read(24, d);  // bytes 30..31 written by STA16, bytes 24..25 untouched
    chk("STA16 halfword", d[63:48] === 16'(5387) && d[47:0] === 48'(3578));
    chk("cycle count (N-1)+stalls+4", cycles === (p.size() - 1) + stalls + 4);
    chk("load-use stall seen", stalls >= 1);

    // ---- 1b. the register usage of the worked examples: ADD a4, a2, a5 and
    //          CADD c4, c3, c1 ----
    p = {};
    p.push_back(enc_movi(2, 100));
    p.push_back(enc_movi(5, -27));
    p.push_back(enc(OP_ADD, 4, 2, 5));             // a4 = a2 + a5 = 73
    p.push_back(enc(OP_MOV, 3, 4, 2));             // c3 = 73 + j100
    p.push_back(enc(OP_MOV, 1, 5, 5));             // c1 = -27 - j27
    p.push_back(enc(OP_CADD, 4, 3, 1));            // c4 = c3 + c1 = 46 + j73
    p.push_back(enc(OP_STA64, 4, 2, 0));           // at 100 & ~7 = 96
    run_prog(p, cycles, stalls);
    host_read(96, d);
    chk("ADD a4,a2,a5 then CADD c4,c3,c1", d === cpack(46, 73));

    // ---- 2. Mandelbrot iterations z <- z^2 + c ----
    begin
      longint cs [4][2] = '{'{1, 0}, '{-1, 0}, '{0, 1}, '{-1, 1}};
      foreach (cs[k]) begin
        iss_model m = new();
        longint zr, zi;
        zr = 0;
        zi = 0;
        host_write(0, cpack(cs[k][0], cs[k][1]));
        p = {};
        p.push_back(enc_movi(2, 8));
        p.push_back(enc(OP_ADD, 3, 2, 2));                 // AR3 = 16
        p.push_back(enc(OP_ADD, 3, 3, 3));                 // AR3 = 32 (M bypass)
        p.push_back(enc(OP_ADD, 3, 3, 2));                 // AR3 = 40
        p.push_back(enc(OP_LDA64, 1, 0, 0));               // CR1 = c
        p.push_back(enc(OP_CSUB, 0, 1, 1));                // CR0 = z0 = 0 (load-use)
        for (int n = 0; n < 10; n++) begin
          p.push_back(enc(OP_CSQU, 0, 0, 0));              // z = z^2
          p.push_back(enc(OP_CADD, 0, 0, 1));              // z = z + c
          p.push_back(enc(OP_STA64, 0, 3, n));             // store z_{n+1}
          p.push_back(enc(OP_MOVE, 2, 0, 0));              // W bypass of z
        end
        p.push_back(enc(OP_MOV, 3, 2, 3));                 // CR3 = {8, 40}
        p.push_back(enc(OP_STA64, 3, 3, 12));
        run_prog(p, cycles, stalls);
        chk("Mandelbrot cycle count", cycles === (p.size() - 1) + stalls + 4);
        for (int n = 0; n < 10; n++) begin
          longint er, ei;
          er = iss_model::s32(zr * zr - zi * zi + cs[k][0]);
          ei = iss_model::s32(2 * zr * zi + cs[k][1]);
          zr = er; zi = ei;
          host_read(40 + 8 * n, d);
          chk($sformatf("c=(%0d,%0d) z%0d got %h exp %h", cs[k][0], cs[k][1], n + 1, d, cpack(zr, zi)), d === cpack(zr, zi));
        end
        host_read(136, d);
        chk($sformatf("MOV AR pair %h", d), d === cpack(8, 40));
        // the original design's worked sequences
        if (k == 0) begin
          logic [63:0] z1, z2, z3, z4;
          host_read(40, z1); host_read(48, z2); host_read(56, z3); host_read(64, z4);
          chk("c=1 gives 1,2,5,26", z1 === cpack(1, 0) && z2 === cpack(2, 0) &&
                                   z3 == cpack(5, 0) && z4 == cpack(26, 0));
        end
        if (k == 1) begin
          logic [63:0] z1, z2;
          host_read(40, z1); host_read(48, z2);
          chk("c=-1 gives -1,0", z1 === cpack(-1, 0) && z2 === cpack(0, 0));
        end
      end
    end

    // ---- 3. latency of a lone instruction ----
    p = {};
    p.push_back(enc_movi(5, 7));
    run_prog(p, cycles, stalls);
    chk("one instruction: write-back 4 cycles after fetch", cycles === 4);

    // ---- coverage of the mechanisms ----
    $display("events: load-use stalls %0d, M bypasses %0d, W bypasses %0d",
             n_stall, n_byp_m, n_byp_w);
    chk("load-use stall happened", n_stall > 0);
    chk("bypass from M happened", n_byp_m > 0);
    chk("bypass from W happened", n_byp_w > 0);
    foreach (n_op[op]) $display("  %-6s executed %0d times", op.name(), n_op[op]);
    for (opcode_e op = op.first(); ; op = op.next()) begin
      chk($sformatf("%s executed", op.name()), n_op.exists(op) && n_op[op] > 0);
      if (op == op.last()) break;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
