// spam_block_memory: image store of the SPAM extractor.
//
// A DEPTH x 32-bit memory, each word holding four horizontally adjacent 8-bit
// pixels, with one write port for loading the image and two synchronous read
// ports. During a scan the read ports return the same word position of rows i
// (ADD1 -> R1) and i+1 (ADD2 -> R2), so one access delivers the 2 x 4 pixel
// window the difference filters need. Both reads have one cycle of latency,
// as a block RAM has; a read of the address being written returns the old
// word. The word width and the two read ports follow the architecture; the
// depth is rows*cols/4 (65536 words for a 512 x 512 image).
module spam_block_memory #(
  parameter int unsigned DEPTH = 65536,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr1,
  input  logic [AW-1:0]    raddr2,
  output logic [WIDTH-1:0] rdata1,
  output logic [WIDTH-1:0] rdata2
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata1 <= mem[raddr1];
    rdata2 <= mem[raddr2];
  end

endmodule
