// tb_asip_core: self-checking test of the five-stage pipeline on its own.
//
// The instruction and data memories are modelled in the testbench. Each run
// executes a random program (a prologue that sets base registers and
// operands, a random body that reuses a few registers so that dependent
// instructions follow each other closely, and an epilogue that stores every
// CR and AR register) and compares the final data memory with the
// instruction-level reference model. It also checks that the program takes
// exactly (instructions - 1) + stalls + 4 cycles from the first fetch to the
// last write-back, that every instruction retires once, and that load-use
// stalls and both bypass paths occurred.
module tb_asip_core;
  import asip_pkg::*;
  import tb_asm_pkg::*;

  localparam int MEMB = 2048;

  logic        clk = 0, rst_n = 0, run = 0;
  logic [7:0]  imem_addr;
  logic [23:0] imem_data;
  logic        dmem_we;
  word_t       dmem_addr;
  msize_e      dmem_size;
  logic [63:0] dmem_wdata, dmem_rdata;
  logic        retire, busy, evt_stall, evt_bypass_m, evt_bypass_w;

  logic [23:0]  prog [256];
  byte unsigned mem [MEMB];
  int checks = 0, failures = 0;
  int n_stall = 0, n_byp_m = 0, n_byp_w = 0;

  asip_core #(.PCW(8)) dut (.*);

  always #5 clk = ~clk;

  assign imem_data = prog[imem_addr];

  function automatic int nb(msize_e s);
    return (s == SZ_16) ? 2 : (s == SZ_32) ? 4 : 8;
  endfunction

  always_comb begin
    int base;
    base = (int'(dmem_addr) & ~(nb(dmem_size) - 1)) % MEMB;
    dmem_rdata = '0;
    for (int i = nb(dmem_size) - 1; i >= 0; i--)
      dmem_rdata = (dmem_rdata << 8) | 64'(mem[base + i]);
  end

  always @(posedge clk) begin
    if (dmem_we) begin
      int base;
      base = (int'(dmem_addr) & ~(nb(dmem_size) - 1)) % MEMB;
      for (int i = 0; i < nb(dmem_size); i++) mem[base + i] <= 8'(dmem_wdata >> (8 * i));
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_random_program();
    iss_model m = new();
    int L = 0;
    int cyc, first, last, retired, stalls;
    int cr_pool = 2 + $urandom % 5;
    // data
    for (int i = 0; i < MEMB; i++) begin
      mem[i] = (i < 256) ? 8'($urandom) : 8'h00;
      m.mem[i] = mem[i];
    end
    foreach (prog[i]) prog[i] = '0;
    // prologue
    for (int i = 0; i < 4; i++) prog[L++] = enc_movi(i, 32 * i);
    for (int i = 4; i < 16; i++) prog[L++] = enc_movi(i, int'($urandom % 256));
    for (int i = 0; i < 16; i++) prog[L++] = enc(OP_MOV, i, $urandom % 16, $urandom % 16);
    // body
    for (int k = 0; k < 150; k++) begin
      int r = $urandom % cr_pool, s = $urandom % cr_pool, t = $urandom % cr_pool;
      int b = $urandom % 4, off = $urandom % 16;
      case ($urandom % 14)
        0:  prog[L++] = enc(OP_ADD, 4 + $urandom % 4, 4 + $urandom % 4, 4 + $urandom % 4);
        1:  prog[L++] = enc_movi(4 + $urandom % 4, int'($urandom % 256));
        2:  prog[L++] = enc(OP_CADD, r, s, t);
        3:  prog[L++] = enc(OP_CSUB, r, s, t);
        4:  prog[L++] = enc(OP_CMUL, r, s, t);
        5:  prog[L++] = enc(OP_CSQU, r, s, t);
        6:  prog[L++] = enc(OP_LDA16, r, b, off);
        7:  prog[L++] = enc(OP_LDA32, r, b, off);
        8:  prog[L++] = enc(OP_LDA64, r, b, off);
        9:  prog[L++] = enc(OP_STA16, r, b, off);
        10: prog[L++] = enc(OP_STA32, r, b, off);
        11: prog[L++] = enc(OP_STA64, r, b, off);
        12: prog[L++] = enc(OP_MOV, r, 4 + $urandom % 4, 4 + $urandom % 4);
        default: prog[L++] = enc(OP_MOVE, r, s, t);
      endcase
    end
    // epilogue: dump CR[0..15], then AR[1..15] from address 1024
    for (int i = 0; i < 16; i++) prog[L++] = enc(OP_STA64, i, 0, i);
    prog[L++] = enc_movi(0, 64);
    repeat (4) prog[L++] = enc(OP_ADD, 0, 0, 0);
    for (int k = 0; k < 8; k++) begin
      prog[L++] = enc(OP_MOV, k, 2 * k, 2 * k + 1);
      prog[L++] = enc(OP_STA64, k, 0, k);
    end
    for (int i = 0; i < L; i++) m.step(prog[i]);

    // run
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    cyc = 0; first = -1; last = -1; retired = 0; stalls = 0;
    while (cyc < 4 * L + 50) begin
      run = (int'(imem_addr) < L) && (imem_addr != 8'hFF);
      if (run && first < 0) first = cyc;
      @(posedge clk);
      if (retire) begin retired++; last = cyc; end
      if (evt_stall) begin stalls++; n_stall++; end
      if (evt_bypass_m) n_byp_m++;
      if (evt_bypass_w) n_byp_w++;
      @(negedge clk);
      cyc++;
    end
    run = 0;

    checks++;
    if (retired != L) begin failures++; $display("FAIL retired %0d of %0d", retired, L); end
    checks++;
    if (last - first != (L - 1) + stalls + 4) begin
      failures++;
      $display("FAIL timing: %0d cycles for %0d instr, %0d stalls", last - first, L, stalls);
    end
    for (int i = 0; i < MEMB; i += 8) begin
      logic [63:0] got, exp;
      for (int j = 7; j >= 0; j--) begin
        got = (got << 8) | 64'(mem[i + j]);
        exp = (exp << 8) | 64'(m.mem[i + j]);
      end
      checks++;
      if (got !== exp) begin
        failures++;
        $display("FAIL mem[%0d] = %h exp %h", i, got, exp);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    repeat (12) run_random_program();
    checks++;
    if (n_stall == 0 || n_byp_m == 0 || n_byp_w == 0) begin
      failures++;
      $display("FAIL events: stall %0d bypass_m %0d bypass_w %0d", n_stall, n_byp_m, n_byp_w);
    end
    $display("events: load-use stalls %0d, M bypasses %0d, W bypasses %0d",
             n_stall, n_byp_m, n_byp_w);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
