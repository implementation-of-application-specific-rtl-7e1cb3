// asip_top: the Mandelbrot ASIP with its instruction and data memories.
//
// asip_core (five-stage pipeline with the complex-arithmetic extension) is
// connected to imem over its instruction bus and to dmem over a separate data
// bus, as in the original design's Harvard-style core. A host port loads the
// program (prog_*) and reads or writes the data memory in 64-bit words
// (host_*); the core owns the data memory while it is busy (run high or
// instructions still in the pipeline), the host otherwise. The host port, the memory sizes and the run control are this
// design's choices.
//
// Usage: hold run low, load the program from word 0 and the data, raise run
// until the program has been fetched, lower it, wait for busy to fall, then
// read the results through host_*.
// retire pulses once per instruction written back; evt_* report the
// pipeline's load-use stall and bypass events. An assertion flags host
// writes made while the core is busy; its use of rst_n as a disable condition
// makes lint report rst_n as both a synchronous and an asynchronous signal,
// which has no effect on the hardware.
module asip_top
  import asip_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 256,
  parameter int unsigned DMEM_BYTES = 2048,
  localparam int unsigned PCW       = $clog2(IMEM_DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  input  logic            prog_we,
  input  logic [PCW-1:0]  prog_addr,
  input  logic [ILEN-1:0] prog_data,
  input  logic            host_we,
  input  logic [XLEN-1:0] host_addr,
  input  logic [CLEN-1:0] host_wdata,
  output logic [CLEN-1:0] host_rdata,
  output logic            retire,
  output logic            busy,
  output logic            evt_stall,
  output logic            evt_bypass_m,
  output logic            evt_bypass_w
);

  logic [PCW-1:0]  imem_addr;
  logic [ILEN-1:0] imem_data;
  logic            core_we, mem_we;
  word_t           core_addr, mem_addr;
  msize_e          core_size, mem_size;
  logic [CLEN-1:0] core_wdata, mem_wdata, mem_rdata;

  asip_core #(.PCW(PCW)) u_core (
    .clk, .rst_n, .run,
    .imem_addr, .imem_data,
    .dmem_we(core_we), .dmem_addr(core_addr), .dmem_size(core_size),
    .dmem_wdata(core_wdata), .dmem_rdata(mem_rdata),
    .retire, .busy, .evt_stall, .evt_bypass_m, .evt_bypass_w
  );

  imem #(.DEPTH(IMEM_DEPTH), .WIDTH(ILEN)) u_imem (
    .clk, .we(prog_we), .waddr(prog_addr), .wdata(prog_data),
    .raddr(imem_addr), .rdata(imem_data)
  );

  always_comb begin
    if (busy) begin
      mem_we = core_we; mem_addr = core_addr; mem_size = core_size; mem_wdata = core_wdata;
    end else begin
      mem_we = host_we; mem_addr = host_addr; mem_size = SZ_64;     mem_wdata = host_wdata;
    end
  end

  dmem #(.BYTES(DMEM_BYTES)) u_dmem (
    .clk, .we(mem_we), .addr(mem_addr), .size(mem_size),
    .wdata(mem_wdata), .rdata(mem_rdata)
  );

  assign host_rdata = mem_rdata;

  // Host port rule: program and data writes only while the core is idle.
  a_host_idle: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !host_we && !prog_we)
    else $error("host write while the core is busy");

endmodule
