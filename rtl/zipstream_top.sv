// zipstream_top: the protected static block of a ZipStream system.
//
// ZipStream keeps, inside the FPGA, a compressed "black-box" partial
// bitstream for each reconfigurable partition (NUM_PARTS of them): a bitstream with no logic in the
// partition, only the static routes that cross it. If loading a bitstream
// from external memory ends with an ICAP CRC error, the static routes through
// the partition may be broken; the reconfiguration controller then decodes
// the black-box bitstream from the on-chip block RAM and loads it, restoring
// the static part of the system (graceful degradation).
//
// This top holds the three parts that must sit together outside any
// reconfigurable partition: the reconfiguration controller, the hardware
// decompressor and the block RAM with the compressed image. The ICAP and the
// external memory are outside; their signals are ports. The load ports write
// the block RAM (a directory of image addresses, one packet per partition,
// then the images), and each partition's LUT ROM page and group table,
// standing for their initial contents in the device bitstream. The number of
// partitions is this design's choice.
//
// Timing: one bitstream word per clock towards the ICAP while icap_busy is
// low, both from the external stream and, for runs of zeros, from the
// decompressor; a literal byte of the compressed image takes one clock.
module zipstream_top
  import zs_pkg::*;
#(
  parameter int unsigned BRAM_AW   = 10,
  parameter int unsigned NUM_PARTS = 4,
  localparam int unsigned PART_W   = (NUM_PARTS > 1) ? $clog2(NUM_PARTS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // reconfiguration request and status
  input  logic               req,
  input  logic [PART_W-1:0]  req_part,
  input  logic [31:0]        req_len,
  output logic               busy,
  output logic               done,
  output rc_result_t         result,
  output logic               recovering,
  // external memory word stream
  output logic               ext_start,
  input  logic [WORD_W-1:0]  ext_data,
  input  logic               ext_valid,
  output logic               ext_ready,
  // ICAP
  output logic [WORD_W-1:0]  icap_data,
  output logic               icap_write,
  output logic               icap_last,
  input  logic               icap_busy,
  input  logic               icap_done,
  input  logic               icap_crc_err,
  // initial contents: block RAM, LUT ROM, group table
  input  logic               bram_we,
  input  logic [BRAM_AW-1:0] bram_waddr,
  input  logic [PKT_W-1:0]   bram_wdata,
  input  logic [PART_W-1:0]  tbl_part,   // partition of the LUT / group writes
  input  logic               lut_we,
  input  logic [LUT_AW-1:0]  lut_waddr,
  input  lut_entry_t         lut_wdata,
  input  logic               grp_we,
  input  logic [GRP_W-1:0]   grp_idx,
  input  group_desc_t        grp_desc,
  input  logic               gmax_we,
  input  logic [GRP_W-1:0]   gmax,
  // observation of decoder events
  output logic               dec_split,
  output logic               dec_run
);

  logic               bram_re;
  logic [BRAM_AW-1:0] bram_raddr;
  logic [PKT_W-1:0]   bram_rdata;
  logic               dec_start, dec_error;
  logic [PART_W-1:0]  dec_part;
  logic [WORD_W-1:0]  dec_data;
  logic               dec_valid, dec_last, dec_ready;

  zs_bitstream_bram #(.DEPTH(2**BRAM_AW)) u_bram (
    .clk,
    .we (bram_we), .waddr (bram_waddr), .wdata (bram_wdata),
    .re (bram_re), .raddr (bram_raddr), .rdata (bram_rdata)
  );

  zs_decompressor #(.BRAM_AW(BRAM_AW), .NUM_PARTS(NUM_PARTS)) u_dec (
    .clk, .rst_n,
    .start (dec_start), .part (dec_part), .tbl_part, .busy (), .done (), .error (dec_error),
    .bram_re, .bram_raddr, .bram_rdata,
    .word (dec_data), .word_valid (dec_valid), .word_last (dec_last), .word_ready (dec_ready),
    .lut_we, .lut_waddr, .lut_wdata,
    .grp_we, .grp_idx, .grp_desc, .gmax_we, .gmax,
    .split (dec_split), .run_active (dec_run)
  );

  zs_reconfig_controller #(.NUM_PARTS(NUM_PARTS)) u_rc (
    .clk, .rst_n,
    .req, .req_part, .req_len, .busy, .done, .result,
    .ext_start, .ext_data, .ext_valid, .ext_ready,
    .dec_start, .dec_part, .dec_data, .dec_valid, .dec_last, .dec_error, .dec_ready,
    .icap_data, .icap_write, .icap_last, .icap_busy, .icap_done, .icap_crc_err,
    .recovering
  );

endmodule
