// zs_bitstream_bram: block RAM holding the compressed black-box bitstreams.
//
// The decompressor expects a directory in the first packets (one per
// partition, the address of its image) followed by the images.
// DEPTH words of one 16-bit packet each (1024 x 16 = one 18 Kbit block RAM).
// One write port loads the image (the device's initial BRAM contents); one
// read port returns the word addressed on a cycle with re high at the next
// clock edge, like a block RAM. In the device the BRAM's own ECC protects the
// image; that is not modelled. Depth and width are this design's choices.
module zs_bitstream_bram
  import zs_pkg::*;
#(
  parameter int unsigned DEPTH     = 1024,
  parameter string       INIT_FILE = ""
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [PKT_W-1:0]         wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [PKT_W-1:0]         rdata
);

  logic [PKT_W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
