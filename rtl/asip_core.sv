// asip_core: five-stage in-order pipeline executing the Mandelbrot ASIP
// instruction set.
//
// Stages follow the base core's abstract pipeline:
//   I  prefetch/fetch: PC goes to the instruction memory, the word returns
//      in the same cycle and is latched into the I/R register;
//   R  decode (instr_decoder) and read of the AR and CR register files;
//   E  execute (tie_exec: ADD, MOVI, CADD/CSUB, CMUL/CSQU, MOV, MOVE, and the
//      load/store address);
//   M  data-memory access; load data is formatted into a complex value;
//   W  write back into AR or CR.
// Each instruction spends one cycle per stage, so one instruction can retire
// per cycle and an instruction fetched in cycle n writes back in cycle n+4.
// The stage list and one-cycle-per-stage rule follow the original design; hazard
// handling is this design's own: results are bypassed into E from the M and W
// stages (register files write through for W-to-R), and an instruction in R
// that reads the CR register a load in E is about to write is held for one
// cycle (load-use stall). There are no branches, so the PC counts instruction
// words upward from 0 while `run` is high; with `run` low no new
// instructions are fetched and the pipeline drains.
//
// Interface: imem_addr/imem_data is the instruction bus; dmem_* the data bus
// (dmem_rdata combinational, right-aligned); retire pulses for each
// instruction written back; busy is high while run is high or any
// instruction is still in the pipeline; evt_* pulse when a stall or bypass
// happens.
module asip_core
  import asip_pkg::*;
#(
  parameter int unsigned PCW = 8   // instruction-memory word-address width
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  output logic [PCW-1:0]  imem_addr,
  input  logic [ILEN-1:0] imem_data,
  output logic            dmem_we,
  output word_t           dmem_addr,
  output msize_e          dmem_size,
  output logic [CLEN-1:0] dmem_wdata,
  input  logic [CLEN-1:0] dmem_rdata,
  output logic            retire,
  output logic            busy,
  output logic            evt_stall,
  output logic            evt_bypass_m,
  output logic            evt_bypass_w
);

  // ---------------- pipeline registers ----------------
  typedef struct packed {
    logic            valid;
    logic [ILEN-1:0] instr;
  } ir_t;

  typedef struct packed {
    ctrl_t ctrl;
    word_t ar_s, ar_t;
    cplx_t cr_s, cr_t, cr_r;
  } re_t;

  typedef struct packed {
    ctrl_t           ctrl;
    word_t           ar_res;
    cplx_t           cr_res;
    word_t           addr;
    logic [CLEN-1:0] wdata;
  } em_t;

  typedef struct packed {
    ctrl_t ctrl;
    word_t ar_res;
    cplx_t cr_res;
  } mw_t;

  logic [PCW-1:0] pc;
  ir_t            ir_q;
  re_t            re_q;
  em_t            em_q;
  mw_t            mw_q;

  // ---------------- R stage ----------------
  ctrl_t           dec;
  logic [RIDX-1:0] cr_rb_idx;
  word_t           ar_rd_a, ar_rd_b;
  logic [CLEN-1:0] cr_rd_a, cr_rd_b;
  logic            stall;

  instr_decoder u_dec (.instr(ir_q.instr), .ctrl(dec));

  // The second CR read port serves CR[t] or, for a store, CR[r].
  assign cr_rb_idx = dec.rr_cr ? dec.rd : dec.rt;

  regfile #(.WIDTH(XLEN), .DEPTH(NREGS)) u_ar (
    .clk, .rst_n,
    .we(mw_q.ctrl.valid && mw_q.ctrl.ar_we), .waddr(mw_q.ctrl.rd), .wdata(mw_q.ar_res),
    .raddr_a(dec.rs), .rdata_a(ar_rd_a),
    .raddr_b(dec.rt), .rdata_b(ar_rd_b)
  );

  regfile #(.WIDTH(CLEN), .DEPTH(NREGS)) u_cr (
    .clk, .rst_n,
    .we(mw_q.ctrl.valid && mw_q.ctrl.cr_we), .waddr(mw_q.ctrl.rd), .wdata(mw_q.cr_res),
    .raddr_a(dec.rs), .rdata_a(cr_rd_a),
    .raddr_b(cr_rb_idx), .rdata_b(cr_rd_b)
  );

  // Load-use hazard: a load in E writes a CR register the R instruction reads.
  always_comb begin
    stall = 1'b0;
    if (ir_q.valid && dec.valid && re_q.ctrl.valid && re_q.ctrl.load) begin
      if ((dec.rs_cr && dec.rs == re_q.ctrl.rd) ||
          (dec.rt_cr && dec.rt == re_q.ctrl.rd) ||
          (dec.rr_cr && dec.rd == re_q.ctrl.rd))
        stall = 1'b1;
    end
  end

  // ---------------- E stage with bypass ----------------
  logic  m_ar_hit_s, m_ar_hit_t, w_ar_hit_s, w_ar_hit_t;
  logic  m_cr_hit_s, m_cr_hit_t, m_cr_hit_r, w_cr_hit_s, w_cr_hit_t, w_cr_hit_r;
  word_t op_ar_s, op_ar_t;
  cplx_t op_cr_s, op_cr_t, op_cr_r;
  word_t ex_ar_res, ex_addr;
  cplx_t ex_cr_res;
  logic [CLEN-1:0] ex_wdata;

  always_comb begin
    ctrl_t c, m, w;
    c = re_q.ctrl;
    m = em_q.ctrl;
    w = mw_q.ctrl;
    // M-stage loads have no result yet; the stall guarantees none is needed.
    m_ar_hit_s = m.valid && m.ar_we && m.rd == c.rs && c.rs_ar;
    m_ar_hit_t = m.valid && m.ar_we && m.rd == c.rt && c.rt_ar;
    w_ar_hit_s = w.valid && w.ar_we && w.rd == c.rs && c.rs_ar && !m_ar_hit_s;
    w_ar_hit_t = w.valid && w.ar_we && w.rd == c.rt && c.rt_ar && !m_ar_hit_t;
    m_cr_hit_s = m.valid && m.cr_we && !m.load && m.rd == c.rs && c.rs_cr;
    m_cr_hit_t = m.valid && m.cr_we && !m.load && m.rd == c.rt && c.rt_cr;
    m_cr_hit_r = m.valid && m.cr_we && !m.load && m.rd == c.rd && c.rr_cr;
    w_cr_hit_s = w.valid && w.cr_we && w.rd == c.rs && c.rs_cr && !m_cr_hit_s;
    w_cr_hit_t = w.valid && w.cr_we && w.rd == c.rt && c.rt_cr && !m_cr_hit_t;
    w_cr_hit_r = w.valid && w.cr_we && w.rd == c.rd && c.rr_cr && !m_cr_hit_r;

    op_ar_s = m_ar_hit_s ? em_q.ar_res : w_ar_hit_s ? mw_q.ar_res : re_q.ar_s;
    op_ar_t = m_ar_hit_t ? em_q.ar_res : w_ar_hit_t ? mw_q.ar_res : re_q.ar_t;
    op_cr_s = m_cr_hit_s ? em_q.cr_res : w_cr_hit_s ? mw_q.cr_res : re_q.cr_s;
    op_cr_t = m_cr_hit_t ? em_q.cr_res : w_cr_hit_t ? mw_q.cr_res : re_q.cr_t;
    op_cr_r = m_cr_hit_r ? em_q.cr_res : w_cr_hit_r ? mw_q.cr_res : re_q.cr_r;
  end

  tie_exec u_exec (
    .ctrl(re_q.ctrl),
    .ar_s(op_ar_s), .ar_t(op_ar_t),
    .cr_s(op_cr_s), .cr_t(op_cr_t), .cr_r(op_cr_r),
    .ar_res(ex_ar_res), .cr_res(ex_cr_res),
    .mem_addr(ex_addr), .mem_wdata(ex_wdata)
  );

  // ---------------- M stage ----------------
  cplx_t ld_val;

  assign dmem_we    = em_q.ctrl.valid && em_q.ctrl.store;
  assign dmem_addr  = em_q.addr;
  assign dmem_size  = em_q.ctrl.size;
  assign dmem_wdata = em_q.wdata;

  always_comb begin
    unique case (em_q.ctrl.size)
      SZ_16:   ld_val = '{re: word_t'(signed'(dmem_rdata[15:0])), im: '0};
      SZ_32:   ld_val = '{re: word_t'(signed'(dmem_rdata[31:16])),
                          im: word_t'(signed'(dmem_rdata[15:0]))};
      default: ld_val = dmem_rdata;
    endcase
  end

  // ---------------- I stage and pipeline registers ----------------
  assign imem_addr = pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc   <= '0;
      ir_q <= '0;
      re_q <= '0;
      em_q <= '0;
      mw_q <= '0;
    end else begin
      // I -> R
      if (!stall) begin
        ir_q.valid <= run;
        ir_q.instr <= imem_data;
        if (run) pc <= pc + 1'b1;
      end
      // R -> E (a bubble while stalled or for an empty / illegal slot)
      re_q.ctrl       <= dec;
      re_q.ctrl.valid <= ir_q.valid && dec.valid && !stall;
      re_q.ar_s       <= ar_rd_a;
      re_q.ar_t       <= ar_rd_b;
      re_q.cr_s       <= cr_rd_a;
      re_q.cr_t       <= cr_rd_b;
      re_q.cr_r       <= cr_rd_b;
      // E -> M
      em_q.ctrl   <= re_q.ctrl;
      em_q.ar_res <= ex_ar_res;
      em_q.cr_res <= ex_cr_res;
      em_q.addr   <= ex_addr;
      em_q.wdata  <= ex_wdata;
      // M -> W
      mw_q.ctrl   <= em_q.ctrl;
      mw_q.ar_res <= em_q.ar_res;
      mw_q.cr_res <= em_q.ctrl.load ? ld_val : em_q.cr_res;
    end
  end

  assign retire       = mw_q.ctrl.valid;
  assign busy         = run || ir_q.valid || re_q.ctrl.valid || em_q.ctrl.valid ||
                        mw_q.ctrl.valid;
  assign evt_stall    = stall;
  assign evt_bypass_m = re_q.ctrl.valid &&
                        (m_ar_hit_s || m_ar_hit_t || m_cr_hit_s || m_cr_hit_t || m_cr_hit_r);
  assign evt_bypass_w = re_q.ctrl.valid &&
                        (w_ar_hit_s || w_ar_hit_t || w_cr_hit_s || w_cr_hit_t || w_cr_hit_r);

  // A stall is only ever caused by a load in E, and never lasts two cycles
  // (the load has moved on to M by then).
  a_stall_cause: assert property (@(posedge clk) disable iff (!rst_n) stall |-> re_q.ctrl.load)
    else $error("stall without a load in execute");
  a_stall_once:  assert property (@(posedge clk) disable iff (!rst_n) stall |=> !stall)
    else $error("load-use stall longer than one cycle");

endmodule
