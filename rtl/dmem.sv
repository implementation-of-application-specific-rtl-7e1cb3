// dmem: byte-addressed data memory with 16, 32 and 64-bit accesses.
//
// Storage is an array of 64-bit little-endian words. An access of 2, 4 or 8
// bytes is naturally aligned: the address bits below the access size are
// ignored. Write data is right-aligned in wdata and is shifted into its byte
// lanes here; read data comes back right-aligned and zero-extended (the core
// sign-extends as the instruction needs). Writes take effect at the rising
// clock edge; reads are combinational, so a load completes in the memory
// stage. The size of 2 KiB is this design's choice. Contents are not reset.
module dmem
  import asip_pkg::*;
#(
  parameter int unsigned BYTES = 2048,
  localparam int unsigned WORDS = BYTES / 8,
  localparam int unsigned WAW   = $clog2(WORDS)
) (
  input  logic            clk,
  input  logic            we,
  input  word_t           addr,
  input  msize_e          size,
  input  logic [CLEN-1:0] wdata,
  output logic [CLEN-1:0] rdata
);

  logic [CLEN-1:0] mem [WORDS];
  logic [WAW-1:0]  widx;
  logic [2:0]      boff;
  logic [7:0]      lane_mask;
  logic [CLEN-1:0] bit_mask, wshift, word;

  always_comb begin
    widx = addr[WAW+2:3];
    unique case (size)
      SZ_16:   begin boff = {addr[2:1], 1'b0}; lane_mask = 8'b0000_0011; end
      SZ_32:   begin boff = {addr[2], 2'b00};  lane_mask = 8'b0000_1111; end
      default: begin boff = 3'd0;              lane_mask = 8'b1111_1111; end
    endcase
    for (int i = 0; i < 8; i++) bit_mask[8*i +: 8] = {8{lane_mask[i]}};
    bit_mask = bit_mask << (8 * boff);
    wshift   = wdata << (8 * boff);
    word     = mem[widx];
    rdata    = (word & bit_mask) >> (8 * boff);
  end

  always_ff @(posedge clk) begin
    if (we) mem[widx] <= (mem[widx] & ~bit_mask) | (wshift & bit_mask);
  end

endmodule
