// regfile: register file with two combinational read ports and one write port.
//
// The design uses it twice: as the 16 x 32-bit AR file of the base core and as
// the 16 x 64-bit CR file that holds the complex operands of the Mandelbrot
// instructions. Sixteen entries follow from the 4-bit register fields of the
// instruction. A read of the register being written in the same cycle returns
// the new value (write-through), so the write-back stage needs no separate
// bypass into register read. Reset clears every entry; both of these are this
// design's choices.
//
// Timing: write on the rising clock edge when we is high; reads are
// combinational.
module regfile #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr_a,
  output logic [WIDTH-1:0] rdata_a,
  input  logic [AW-1:0]    raddr_b,
  output logic [WIDTH-1:0] rdata_b
);

  logic [WIDTH-1:0] regs [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  always_comb begin
    rdata_a = (we && waddr == raddr_a) ? wdata : regs[raddr_a];
    rdata_b = (we && waddr == raddr_b) ? wdata : regs[raddr_b];
  end

endmodule
