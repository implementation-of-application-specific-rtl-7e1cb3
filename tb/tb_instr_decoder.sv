// tb_instr_decoder: self-checking test of the instruction decoder. For every
// opcode of the instruction set it checks the result selection, register
// write enables, shared-datapath controls, memory controls and the register
// fields, and that unknown opcodes and non-zero sub-opcodes are rejected.
module tb_instr_decoder;
  import asip_pkg::*;

  logic [23:0] instr;
  ctrl_t       c;
  int          checks = 0, failures = 0;

  instr_decoder dut (.instr(instr), .ctrl(c));

  // expected: valid, ar_we, cr_we, sub, square, load, store, size, res_sel
  task automatic expect_op(logic [7:0] op, logic v, logic awe, logic cwe, logic sb, logic sq,
                           logic ld, logic st, msize_e sz, res_sel_e rs);
    logic [3:0] r = 4'($urandom), s = 4'($urandom), t = 4'($urandom);
    instr = {op, r, s, t, 4'b0000};
    #1;
    checks++;
    if (c.valid !== v || (v && (c.ar_we !== awe || c.cr_we !== cwe || c.sub !== sb ||
        c.square !== sq || c.load !== ld || c.store !== st ||
        ((ld || st) && c.size !== sz) || c.res_sel !== rs ||
        c.rd !== r || c.rs !== s || c.rt !== t))) begin
      failures++;
      $display("FAIL opcode %h: %p", op, c);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) begin
      expect_op(8'h80, 1, 1, 0, 0, 0, 0, 0, SZ_64, RES_AR_ADD);
      expect_op(8'h81, 1, 1, 0, 0, 0, 0, 0, SZ_64, RES_AR_IMM);
      expect_op(8'h60, 1, 0, 1, 0, 0, 0, 0, SZ_64, RES_CR_ADDSUB);
      expect_op(8'h61, 1, 0, 1, 1, 0, 0, 0, SZ_64, RES_CR_ADDSUB);
      expect_op(8'h62, 1, 0, 1, 0, 0, 0, 0, SZ_64, RES_CR_MUL);
      expect_op(8'h63, 1, 0, 1, 0, 1, 0, 0, SZ_64, RES_CR_MUL);
      expect_op(8'h64, 1, 0, 1, 0, 0, 1, 0, SZ_16, RES_CR_LOAD);
      expect_op(8'h65, 1, 0, 1, 0, 0, 1, 0, SZ_32, RES_CR_LOAD);
      expect_op(8'h66, 1, 0, 1, 0, 0, 1, 0, SZ_64, RES_CR_LOAD);
      expect_op(8'h67, 1, 0, 0, 0, 0, 0, 1, SZ_16, RES_NONE);
      expect_op(8'h68, 1, 0, 0, 0, 0, 0, 1, SZ_32, RES_NONE);
      expect_op(8'h69, 1, 0, 0, 0, 0, 0, 1, SZ_64, RES_NONE);
      expect_op(8'h6A, 1, 0, 1, 0, 0, 0, 0, SZ_64, RES_CR_MOV);
      expect_op(8'h6B, 1, 0, 1, 0, 0, 0, 0, SZ_64, RES_CR_MOVE);
      expect_op(8'h00, 0, 0, 0, 0, 0, 0, 0, SZ_64, RES_NONE);
      expect_op(8'hFF, 0, 0, 0, 0, 0, 0, 0, SZ_64, RES_NONE);
    end
    // register-read flags of a store (reads AR[s] and CR[r])
    instr = {8'h69, 4'd3, 4'd4, 4'd5, 4'b0000}; #1;
    checks++;
    if (!(c.rs_ar && c.rr_cr && !c.rs_cr && !c.rt_cr)) failures++;
    // CSQU reads only CR[s]
    instr = {8'h63, 4'd3, 4'd4, 4'd5, 4'b0000}; #1;
    checks++;
    if (!(c.rs_cr && !c.rt_cr)) failures++;
    // immediate field of MOVI
    instr = {8'h81, 4'd2, 8'hA5, 4'b0000}; #1;
    checks++;
    if (c.imm8 !== 8'hA5) failures++;
    // non-zero sub-opcode is not an instruction
    instr = {8'h60, 4'd1, 4'd2, 4'd3, 4'b0100}; #1;
    checks++;
    if (c.valid !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
