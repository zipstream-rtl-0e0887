// zs_lut_addr_decoder: first, hardwired stage of the hierarchical SGH decoder.
//
// In a single-side growing Huffman code the code words fall into groups by
// the number of leading ones. This block counts the leading ones of the next
// undecoded bits (a priority encoder), caps the count at the last group gmax,
// and forms the LUT ROM address as the group's base address plus the
// idx_bits bits that follow the group prefix. The prefix of group g < gmax
// is g ones and a zero; the prefix of group gmax is gmax ones. Inside a group,
// code words shorter than the group's longest are given repeated LUT entries,
// so each entry still records its true code length.
//
// The group descriptors depend on the code the compressor produced for each
// partition's black-box image, so there is one small register table per
// partition (NUM_PARTS of them), written once through the cfg port; `part`
// selects the table in use. Decoding
// is combinational from `bits` to `addr`. The counting of leading ones follows
// the published design; the descriptor format is this design's choice.
module zs_lut_addr_decoder
  import zs_pkg::*;
#(
  parameter int unsigned NUM_PARTS = 4,
  localparam int unsigned PART_W   = (NUM_PARTS > 1) ? $clog2(NUM_PARTS) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [PART_W-1:0]   cfg_part,   // partition whose table is written
  input  logic                cfg_we,
  input  logic [GRP_W-1:0]    cfg_idx,
  input  group_desc_t         cfg_desc,
  input  logic                cfg_gmax_we,
  input  logic [GRP_W-1:0]    cfg_gmax,
  input  logic [PART_W-1:0]   part,       // partition being decoded
  input  logic [MAX_CODE-1:0] bits,
  output logic [LUT_AW-1:0]   addr,
  output logic [GRP_W-1:0]    group
);

  group_desc_t      table_q [NUM_PARTS][NGROUPS];
  logic [GRP_W-1:0] gmax_r  [NUM_PARTS];
  logic [GRP_W-1:0] gmax_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NUM_PARTS; p++) begin
        for (int g = 0; g < NGROUPS; g++) table_q[p][g] <= '0;
        gmax_r[p] <= GRP_W'(MAX_CODE);
      end
    end else if (32'(cfg_part) < NUM_PARTS) begin
      if (cfg_we && cfg_idx < GRP_W'(NGROUPS)) table_q[cfg_part][cfg_idx] <= cfg_desc;
      if (cfg_gmax_we) gmax_r[cfg_part] <= cfg_gmax;
    end
  end

  logic [GRP_W-1:0]    lead;      // leading ones of bits
  logic                stop;
  logic [GRP_W-1:0]    plen;      // prefix length of the group
  logic [MAX_CODE-1:0] rest;      // bits after the prefix, MSB aligned
  logic [MAX_CODE-1:0] idx;
  group_desc_t         desc;

  always_comb begin
    lead = '0;
    stop = 1'b0;
    for (int i = MAX_CODE - 1; i >= 0; i--) begin
      if (!stop && bits[i]) lead = lead + 1'b1;
      else                  stop = 1'b1;
    end
    gmax_q = (32'(part) < NUM_PARTS) ? gmax_r[part] : GRP_W'(MAX_CODE);
    group  = (lead > gmax_q) ? gmax_q : lead;
    desc   = (group < GRP_W'(NGROUPS) && 32'(part) < NUM_PARTS) ? table_q[part][group] : '0;
    plen  = (group == gmax_q) ? group : group + 1'b1;
    rest  = bits << plen;
    idx   = (desc.idx_bits == '0) ? '0 : rest >> (MAX_CODE - 32'(desc.idx_bits));
    addr  = desc.base + LUT_AW'(idx);
  end

endmodule
