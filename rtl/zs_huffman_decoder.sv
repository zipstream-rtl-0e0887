// zs_huffman_decoder: the Huffman half of the ZipStream decompressor.
//
// A loop of five parts decodes one code word per clock:
//   REG A/REG B (zs_packet_regs) hold the current and next 16-bit packet;
//   the barrel shifter drops the REG C already-decoded bits of the window;
//   the LUT address decoder finds the leading-ones group and LUT address;
//   the LUT ROM returns the symbol and its code length;
//   the accumulator adds that length to REG C and, when it passes the packet
//   boundary, makes REG B move into REG A and a new packet enter REG B.
// The structure is the published one; the handshakes are this design's own.
//
// Interface: packets come in on pkt_* (valid/ready); decoded RLE symbols go
// out on sym_* (valid/ready), sym_valid whenever both packet registers are
// full. A symbol is consumed, and REG C updated, on a clock edge where
// sym_valid && sym_ready. `clear` restarts the stream. Each partition has its
// own code: `part` selects its LUT ROM page and group table, which are written
// through the lut_* and grp_* load ports for partition tbl_part. Bits that
// reach an unused LUT entry (stored code length 0, as after a corrupted image)
// raise code_err instead of a symbol; the decoder then waits for `clear`.
module zs_huffman_decoder
  import zs_pkg::*;
#(
  parameter int unsigned NUM_PARTS     = 4,
  parameter string       LUT_INIT_FILE = "",
  localparam int unsigned PART_W       = (NUM_PARTS > 1) ? $clog2(NUM_PARTS) : 1,
  localparam int unsigned LUT_TAW      = $clog2(LUT_DEPTH * NUM_PARTS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic [PART_W-1:0] part,       // partition whose code is decoded
  // packet stream
  input  logic [PKT_W-1:0]  pkt_data,
  input  logic              pkt_valid,
  output logic              pkt_ready,
  // decoded symbols
  output rle_sym_t          sym,
  output logic              sym_valid,
  input  logic              sym_ready,
  // table load; tbl_part selects the partition written
  input  logic [PART_W-1:0] tbl_part,
  input  logic              lut_we,
  input  logic [LUT_AW-1:0] lut_waddr,
  input  lut_entry_t        lut_wdata,
  input  logic              grp_we,
  input  logic [GRP_W-1:0]  grp_idx,
  input  group_desc_t       grp_desc,
  input  logic              gmax_we,
  input  logic [GRP_W-1:0]  gmax,
  // an unused LUT entry (code length 0) was reached: the image is corrupt
  output logic              code_err,
  // observation: a code word crossed into the next packet
  output logic              split
);

  logic [WIN_W-1:0]    window;
  logic                window_valid;
  logic [ACC_W-1:0]    regc;
  logic                overflow;
  logic [MAX_CODE-1:0] bits;
  logic [LUT_AW-1:0]   lut_addr;
  logic [GRP_W-1:0]    group;
  lut_entry_t          entry;
  logic                fire;

  assign code_err  = window_valid && !clear && (entry.len == '0);
  assign sym_valid = window_valid && !clear && !code_err;
  assign fire      = sym_valid && sym_ready;
  assign sym       = entry.sym;
  assign split     = overflow;

  zs_packet_regs u_regs (
    .clk, .rst_n, .clear,
    .pkt_data, .pkt_valid, .pkt_ready,
    .advance (overflow),
    .window, .window_valid
  );

  zs_barrel_shifter u_shift (
    .window,
    .shift (regc[SHIFT_W-1:0]),
    .bits
  );

  zs_lut_addr_decoder #(.NUM_PARTS(NUM_PARTS)) u_addr (
    .clk, .rst_n,
    .cfg_part (tbl_part), .part,
    .cfg_we (grp_we), .cfg_idx (grp_idx), .cfg_desc (grp_desc),
    .cfg_gmax_we (gmax_we), .cfg_gmax (gmax),
    .bits, .addr (lut_addr), .group
  );

  zs_lut_rom #(.NUM_PARTS(NUM_PARTS), .INIT_FILE(LUT_INIT_FILE)) u_lut (
    .clk,
    .we (lut_we), .waddr (LUT_TAW'(32'(tbl_part) * LUT_DEPTH + 32'(lut_waddr))), .wdata (lut_wdata),
    .raddr (LUT_TAW'(32'(part) * LUT_DEPTH + 32'(lut_addr))), .rdata (entry)
  );

  zs_accumulator u_acc (
    .clk, .rst_n, .clear,
    .en (fire), .len (entry.len),
    .regc, .overflow
  );

  // A code word of length 0 is never consumed: it is reported on code_err.
  a_len_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
                                  fire |-> entry.len != '0);

endmodule
