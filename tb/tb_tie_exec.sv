// tb_tie_exec: self-checking test of the execute unit. Decoded control words
// come from the decoder; every instruction's result, the scaled load/store
// address and the store-data format are compared with values computed in the
// testbench, including the published CADD/CSUB/CMUL/CSQU example.
module tb_tie_exec;
  import asip_pkg::*;
  import tb_asm_pkg::*;

  logic [23:0] instr;
  ctrl_t       ctrl;
  word_t       ar_s, ar_t, ar_res, addr;
  cplx_t       cr_s, cr_t, cr_r, cr_res;
  logic [63:0] wdata;
  int          checks = 0, failures = 0;

  instr_decoder u_dec (.instr(instr), .ctrl(ctrl));
  tie_exec dut (.ctrl, .ar_s, .ar_t, .cr_s, .cr_t, .cr_r,
                .ar_res, .cr_res, .mem_addr(addr), .mem_wdata(wdata));

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cr_s = '{re: 8965, im: 4523};
    cr_t = '{re: 3578, im: 7412};
    cr_r = '{re: 32'h1234_ABCD, im: 32'h8765_4321};
    ar_s = 32'd100;
    ar_t = 32'd23;
    instr = enc(OP_CADD, 1, 2, 3); #1;
    chk("CADD", cr_res.re === 12543 && cr_res.im === 11935);
    instr = enc(OP_CSUB, 1, 2, 3); #1;
    chk("CSUB", cr_res.re === 5387 && cr_res.im === -2889);
    instr = enc(OP_CMUL, 1, 2, 3); #1;
    chk("CMUL", cr_res.re === -1447706 && cr_res.im === 82631874);
    instr = enc(OP_CSQU, 1, 2, 3); #1;
    chk("CSQU", cr_res.re === 59913696 && cr_res.im === 81097390);
    instr = enc(OP_ADD, 1, 2, 3); #1;
    chk("ADD", ar_res === 32'd123);
    instr = enc_movi(1, -3); #1;
    chk("MOVI", ar_res === 32'hFFFF_FFFD);
    instr = enc(OP_MOV, 1, 2, 3); #1;
    chk("MOV", cr_res.re === 100 && cr_res.im === 23);
    instr = enc(OP_MOVE, 1, 2, 3); #1;
    chk("MOVE", cr_res === cr_s);
    instr = enc(OP_STA16, 1, 2, 5); #1;
    chk("STA16 addr", addr === 32'd110);
    chk("STA16 data", wdata === 64'h0000_0000_0000_ABCD);
    instr = enc(OP_STA32, 1, 2, 5); #1;
    chk("STA32 addr", addr === 32'd120);
    chk("STA32 data", wdata === 64'h0000_0000_ABCD_4321);
    instr = enc(OP_STA64, 1, 2, 5); #1;
    chk("STA64 addr", addr === 32'd140);
    chk("STA64 data", wdata === 64'h1234_ABCD_8765_4321);
    instr = enc(OP_LDA64, 1, 2, 15); #1;
    chk("LDA64 addr", addr === 32'd220);
    // random arithmetic against the reference model
    repeat (200) begin
      iss_model m = new();
      opcode_e ops [6] = '{OP_CADD, OP_CSUB, OP_CMUL, OP_CSQU, OP_ADD, OP_MOVE};
      opcode_e op = ops[$urandom % 6];
      cr_s = '{re: $urandom, im: $urandom};
      cr_t = '{re: $urandom, im: $urandom};
      ar_s = $urandom; ar_t = $urandom;
      m.cre[2] = longint'(cr_s.re); m.cim[2] = longint'(cr_s.im);
      m.cre[3] = longint'(cr_t.re); m.cim[3] = longint'(cr_t.im);
      m.ar[2] = ar_s; m.ar[3] = ar_t;
      instr = enc(op, 1, 2, 3);
      m.step(instr);
      #1;
      if (op === OP_ADD) chk("rand ADD", ar_res === m.ar[1]);
      else chk($sformatf("rand %s", op.name()),
               cr_res.re == 32'(m.cre[1]) && cr_res.im == 32'(m.cim[1]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
