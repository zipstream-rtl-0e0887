// zs_lut_rom: the look-up table of the single-side growing Huffman code.
//
// One table of LUT_DEPTH entries per partition (address = {partition, entry}),
// NUM_PARTS tables in all. Each entry holds a decoded RLE symbol (run flag and
// 8-bit value) and the length of the code word that produced it. Reading is
// asynchronous (a distributed ROM), so the address decoder, the table and the
// accumulator close their loop in one clock and one code word is decoded per
// cycle. The contents are produced by the software compressor; they are
// written through the load port, or read from INIT_FILE (hex, one entry per
// line) when that parameter is set. 128 entries follows the published LUT
// size; the entry layout and the read timing are this design's choices.
module zs_lut_rom
  import zs_pkg::*;
#(
  parameter int unsigned NUM_PARTS = 4,
  parameter string       INIT_FILE = "",
  localparam int unsigned DEPTH    = LUT_DEPTH * NUM_PARTS,
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  lut_entry_t    wdata,
  input  logic [AW-1:0] raddr,
  output lut_entry_t    rdata
);

  lut_entry_t mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
