// zs_pkg: sizes, types and encodings shared by the ZipStream decompressor and
// reconfiguration controller.
//
// The packet width (16), the longest code word (12 bits), the symbol width
// (8 bits, the best Huffman+RLE configuration) and the LUT size (128 entries)
// are the published design's numbers. The entry and group-descriptor formats
// and the controller result encoding are this design's own choice.
package zs_pkg;

  localparam int unsigned PKT_W     = 16;            // input packet width
  localparam int unsigned WIN_W     = 2 * PKT_W;     // {REG A, REG B}
  localparam int unsigned SHIFT_W   = $clog2(WIN_W); // barrel shifter amount
  localparam int unsigned ACC_W     = 16;            // REG C / accumulator width
  localparam int unsigned MAX_CODE  = 12;            // longest Huffman code word
  localparam int unsigned LEN_W     = 4;             // holds 1..MAX_CODE
  localparam int unsigned SYM_W     = 8;             // RLE symbol (word) length
  localparam int unsigned WORD_W    = 32;            // ICAP / bitstream word
  localparam int unsigned BPW       = WORD_W / SYM_W;// symbols per word
  localparam int unsigned LUT_DEPTH = 128;           // SGH look-up table entries
  localparam int unsigned LUT_AW    = $clog2(LUT_DEPTH);
  localparam int unsigned NGROUPS   = MAX_CODE + 1;  // leading-ones groups 0..12
  localparam int unsigned GRP_W     = 4;             // group number width
  localparam int unsigned IDX_W     = 4;             // index bits after a prefix

  // RLE symbol: run = 1 means "value consecutive zero symbols".
  typedef struct packed {
    logic             run;
    logic [SYM_W-1:0] value;
  } rle_sym_t;

  // One LUT ROM entry: the decoded symbol and the length of its code word.
  typedef struct packed {
    rle_sym_t         sym;
    logic [LEN_W-1:0] len;
  } lut_entry_t;

  // Per-group descriptor of the hierarchical decoder.
  typedef struct packed {
    logic [LUT_AW-1:0] base;      // first LUT address of the group
    logic [IDX_W-1:0]  idx_bits;  // bits after the prefix that index the group
  } group_desc_t;

  // Outcome of a reconfiguration reported by the controller.
  typedef enum logic [1:0] {
    RES_NONE      = 2'd0,
    RES_OK        = 2'd1,  // external bitstream passed the ICAP CRC
    RES_RECOVERED = 2'd2,  // CRC error, black-box bitstream loaded correctly
    RES_FAILED    = 2'd3   // black-box bitstream also failed
  } rc_result_t;

endpackage
