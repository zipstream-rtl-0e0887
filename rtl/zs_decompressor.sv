// zs_decompressor: the ZipStream hardware decompressor.
//
// The block RAM starts with a directory: packet p holds the address of the
// compressed black-box image of partition p. On `start` the decompressor reads
// the directory entry of `part`, then the image from that address. Each image
// begins with two header packets holding the number of
// 32-bit output words (most significant packet first); the rest is the
// Huffman-coded RLE symbol stream, MSB first, padded to a whole packet. The
// packets feed the Huffman decoder (REG A/B, barrel shifter, LUT address
// decoder, LUT ROM, accumulator/REG C) and its symbols the run-length decoder,
// which emits the original bitstream words. `done` pulses after the last
// word has been handed on; word_last marks that word. If the code bits reach
// an unused LUT entry the image is corrupt: decoding stops and `done` pulses
// with `error`. The two-stage Huffman + RLE structure is the published one;
// the header, the packet buffer and the corrupt-image stop are this design's
// own.
//
// Throughput: one code word per clock, a literal byte or up to four zero
// bytes per clock, as long as word_ready stays high.
module zs_decompressor
  import zs_pkg::*;
#(
  parameter int unsigned BRAM_AW       = 10,
  parameter int unsigned NUM_PARTS     = 4,
  parameter string       LUT_INIT_FILE = "",
  localparam int unsigned PART_W       = (NUM_PARTS > 1) ? $clog2(NUM_PARTS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [PART_W-1:0]  part,      // partition whose black box is decoded, with start
  output logic               busy,
  output logic               done,
  output logic               error,     // with done: image corrupt, stopped early
  // block RAM read port
  output logic               bram_re,
  output logic [BRAM_AW-1:0] bram_raddr,
  input  logic [PKT_W-1:0]   bram_rdata,
  // decoded bitstream words
  output logic [WORD_W-1:0]  word,
  output logic               word_valid,
  output logic               word_last,
  input  logic               word_ready,
  // table load
  input  logic [PART_W-1:0]  tbl_part,
  input  logic               lut_we,
  input  logic [LUT_AW-1:0]  lut_waddr,
  input  lut_entry_t         lut_wdata,
  input  logic               grp_we,
  input  logic [GRP_W-1:0]   grp_idx,
  input  group_desc_t        grp_desc,
  input  logic               gmax_we,
  input  logic [GRP_W-1:0]   gmax,
  // observation
  output logic               split,
  output logic               run_active
);

  typedef enum logic [2:0] {D_IDLE, D_DIR, D_SEEK, D_HDR0, D_HDR1, D_RUN} dstate_t;

  dstate_t          state;
  logic [31:0]      total;       // words in the image
  logic [31:0]      formed;      // words formed by the RLE decoder
  logic [31:0]      sent;        // words handed on
  logic [PKT_W-1:0] f_data;
  logic             f_valid, f_ready;
  logic             hd_ready;
  rle_sym_t         sym;
  logic             sym_valid, sym_ready;
  logic             push;
  logic             clear;
  logic             out_fire;
  logic             code_err;
  logic [PART_W-1:0]  part_q;
  logic [BRAM_AW-1:0] image_base;
  logic               seek;       // restart the fetch at the image

  assign clear    = start;
  assign busy     = (state != D_IDLE);
  assign seek     = (state == D_SEEK);
  assign f_ready  = (state == D_DIR || state == D_HDR0 || state == D_HDR1) ? 1'b1 :
                    (state == D_RUN) ? hd_ready : 1'b0;
  assign out_fire = word_valid && word_ready;
  assign word_last = word_valid && (sent == total - 1);

  zs_packet_fetch #(.AW(BRAM_AW)) u_fetch (
    .clk, .rst_n, .start (start || seek), .stop (!busy && !start),
    .base (start ? BRAM_AW'(part) : image_base),
    .re (bram_re), .raddr (bram_raddr), .rdata (bram_rdata),
    .pkt_data (f_data), .pkt_valid (f_valid), .pkt_ready (f_ready)
  );

  zs_huffman_decoder #(.NUM_PARTS(NUM_PARTS), .LUT_INIT_FILE(LUT_INIT_FILE)) u_huff (
    .clk, .rst_n, .clear, .part (part_q), .tbl_part,
    .pkt_data (f_data), .pkt_valid (f_valid && state == D_RUN), .pkt_ready (hd_ready),
    .sym, .sym_valid, .sym_ready,
    .lut_we, .lut_waddr, .lut_wdata,
    .grp_we, .grp_idx, .grp_desc, .gmax_we, .gmax,
    .code_err, .split
  );

  zs_run_len_decoder u_rle (
    .clk, .rst_n, .clear,
    .enable (state == D_RUN && formed < total),
    .sym, .sym_valid, .sym_ready,
    .word, .word_valid, .word_ready,
    .push, .run_active
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= D_IDLE;
      total  <= '0;
      formed <= '0;
      sent   <= '0;
      done   <= 1'b0;
      error  <= 1'b0;
      part_q <= '0;
      image_base <= '0;
    end else begin
      done  <= 1'b0;
      error <= 1'b0;
      if (start) begin
        state  <= D_DIR;
        part_q <= part;
        formed <= '0;
        sent   <= '0;
      end else begin
        if (push) formed <= formed + 1;
        if (out_fire) sent <= sent + 1;
        unique case (state)
          D_DIR:  if (f_valid) begin image_base <= BRAM_AW'(f_data); state <= D_SEEK; end
          D_SEEK: state <= D_HDR0;
          D_HDR0: if (f_valid) begin total[31:16] <= f_data; state <= D_HDR1; end
          D_HDR1: if (f_valid) begin
                    total[15:0] <= f_data;
                    if ({total[31:16], f_data} == '0) begin
                      state <= D_IDLE;   // empty image
                      done  <= 1'b1;
                    end else begin
                      state <= D_RUN;
                    end
                  end
          D_RUN:  if (out_fire && word_last) begin
                    state <= D_IDLE;
                    done  <= 1'b1;
                  end else if (code_err && formed < total && !run_active) begin
                    state <= D_IDLE;   // corrupt image: give up
                    done  <= 1'b1;
                    error <= 1'b1;
                  end
          default: ;
        endcase
      end
    end
  end

endmodule
