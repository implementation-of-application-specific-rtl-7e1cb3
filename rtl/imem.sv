// imem: instruction memory of the ASIP, DEPTH words of 24 bits.
//
// The core has its own instruction bus, separate from the data bus. The fetch
// stage presents a word index and receives the instruction in the same cycle
// (combinational read). A host write port loads the program before the core
// is started. Depth 256 (768 bytes) is this design's choice, sized to hold
// the 566-byte Mandelbrot application; contents are not reset.
module imem #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 24,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
