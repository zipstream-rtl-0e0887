// tb_zipstream_top: end-to-end test of the protected static block at its
// default sizes.
//
// For five partition sizes (1 to 5 frames) and ten black-box placements each,
// a black-box bitstream is generated, compressed by the reference model and
// stored for one of the four partitions (directory entry, image slot in the
// block RAM, LUT ROM page and group table). Module bitstreams are then
// requested for that partition and for one stored earlier, from the external
// memory stand-in:
//   - clean:      the ICAP CRC passes, result OK, nothing else is loaded;
//   - corrupted:  one bit flipped, the ICAP reports a CRC error and the
//                 controller loads the decompressed black box: result
//                 RECOVERED and the ICAP must have received exactly the
//                 black-box words after the external ones;
//   - both bad:   the external bitstream and one packet of the stored image
//                 are corrupted, so the black-box load fails too: FAILED.
// The ICAP model inserts random busy cycles (none in the first pass, which
// also checks the recovery time against the decoder model) and the external
// stream has random gaps. Each mechanism is counted; one that never happens
// is a failure. Compression rates (image plus LUT over original) are printed.
module tb_zipstream_top;
  import zs_pkg::*;
  import zs_tb_pkg::*;
  localparam int unsigned LATENCY = 12;
  logic clk = 0, rst_n = 0;
  logic req = 0;
  logic [1:0] req_part = '0, tbl_part = '0;
  logic [31:0] req_len = '0;
  logic busy, done, recovering;
  rc_result_t result;
  logic ext_start, ext_valid, ext_ready;
  logic [31:0] ext_data;
  logic [31:0] icap_data;
  logic icap_write, icap_last, icap_busy, icap_done, icap_crc_err;
  logic bram_we = 0, lut_we = 0, grp_we = 0, gmax_we = 0;
  logic [9:0] bram_waddr = '0;
  logic [PKT_W-1:0] bram_wdata = '0;
  logic [LUT_AW-1:0] lut_waddr = '0;
  lut_entry_t lut_wdata = '0;
  logic [GRP_W-1:0] grp_idx = '0, gmax = '0;
  group_desc_t grp_desc = '0;
  logic dec_split, dec_run;
  int checks = 0, failures = 0;
  int n_ok = 0, n_recovered = 0, n_failed = 0, n_split = 0, n_run_clk = 0;
  int n_ext_gap = 0, n_rate_checked = 0;
  int rate_sum = 0, rate_cnt = 0;

  word_q_t ext_img;
  int ei = -1;
  logic ext_gap = 0;

  zipstream_top dut (
    .clk, .rst_n, .req, .req_part, .req_len, .busy, .done, .result, .recovering,
    .ext_start, .ext_data, .ext_valid, .ext_ready,
    .icap_data, .icap_write, .icap_last, .icap_busy, .icap_done, .icap_crc_err,
    .bram_we, .bram_waddr, .bram_wdata, .tbl_part, .lut_we, .lut_waddr, .lut_wdata,
    .grp_we, .grp_idx, .grp_desc, .gmax_we, .gmax,
    .dec_split, .dec_run);

  zs_icap_model u_icap (.clk, .rst_n, .icap_data, .icap_write, .icap_last,
                        .icap_busy, .icap_done, .icap_crc_err);

  always #5 clk = ~clk;

  assign ext_valid = (ei >= 0) && (ei < ext_img.size()) && !ext_gap;
  assign ext_data  = ext_valid ? ext_img[ei] : 32'h0;

  always @(posedge clk) begin
    if (ext_start) ei <= 0;
    else if (ext_valid && ext_ready) ei <= ei + 1;
    ext_gap <= (u_icap.busy_pct != 0) && (($urandom % 6) == 0) && !(ext_valid && !ext_ready);
    if (ext_gap && ei >= 0 && ei < ext_img.size()) n_ext_gap <= n_ext_gap + 1;
    if (dec_split && recovering) n_split <= n_split + 1;
    if (dec_run && recovering) n_run_clk <= n_run_clk + 1;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int unsigned SLOT = 250;   // packets reserved per partition image
  word_q_t bb_of   [4];
  sym_q_t  syms_of [4];
  pkt_q_t  img_of  [4];
  bit      loaded  [4] = '{0, 0, 0, 0};

  // Store a black box for partition p: directory entry, image, LUT page, groups.
  task automatic load_partition(int p, word_q_t bb);
    table_t t;
    pkt_q_t img;
    sym_q_t syms;
    int unsigned nbits;
    t.codes = shape_growing(t.gmax);
    checks++;
    if (!compress(bb, t, img, syms, nbits)) begin failures++; $display("alphabet too large"); return; end
    checks++;
    if (img.size() > SLOT) begin failures++; $display("image does not fit its slot"); return; end
    // compression rate as published: (image + LUT) / original, LUT at 2 bytes an entry
    rate_sum += (100 * (2 * img.size() + 2 * t.lut_used)) / (4 * bb.size());
    rate_cnt++;
    @(negedge clk); bram_we = 1; bram_waddr = 10'(p); bram_wdata = 16'(4 + p * SLOT);
    foreach (img[i]) begin
      @(negedge clk); bram_we = 1; bram_waddr = 10'(4 + p * SLOT + i); bram_wdata = img[i];
    end
    @(negedge clk); bram_we = 0; tbl_part = 2'(p);
    for (int a = 0; a < LUT_DEPTH; a++) begin
      @(negedge clk); lut_we = 1; lut_waddr = LUT_AW'(a); lut_wdata = t.lut[a];
    end
    @(negedge clk); lut_we = 0;
    for (int g = 0; g < NGROUPS; g++) begin
      @(negedge clk); grp_we = 1; grp_idx = GRP_W'(g); grp_desc = t.groups[g];
    end
    @(negedge clk); grp_we = 0; gmax_we = 1; gmax = GRP_W'(t.gmax);
    @(negedge clk); gmax_we = 0; tbl_part = 2'(p + 1);
    bb_of[p] = bb; syms_of[p] = syms; img_of[p] = img; loaded[p] = 1;
  endtask

  task automatic write_packet(int addr, logic [15:0] v);
    @(negedge clk); bram_we = 1; bram_waddr = 10'(addr); bram_wdata = v;
    @(negedge clk); bram_we = 0;
  endtask

  // Request partition q. mode 0 clean, 1 corrupted external, 2 corrupted
  // external and stored image (restored afterwards).
  task automatic scenario(int q, int seed, int mode);
    word_q_t ext, want, bb;
    int cyc = 0, rec_start = -1, rec_end = -1, log0, frames, bad_addr;
    rc_result_t want_res;
    bb = bb_of[q];
    frames = (bb.size() - 10) / 41 - 1;
    ext = gen_bitstream(frames, seed + 50000);
    for (int i = 8; i < ext.size() - 2; i += 3) ext[i] ^= 32'(i * 2654435761);
    ext[ext.size() - 1] = crc32c(ext, ext.size() - 1);
    if (mode != 0) ext[10 + seed % 20] ^= 32'h0000_0020;
    if (mode == 2) begin
      bad_addr = 4 + q * SLOT + 2 + (seed % (img_of[q].size() - 2));
      write_packet(bad_addr, img_of[q][bad_addr - 4 - q * SLOT] ^ 16'h0100);
    end
    want_res = (mode == 0) ? RES_OK : (mode == 1) ? RES_RECOVERED : RES_FAILED;
    ext_img = ext;
    log0 = u_icap.log.size();
    @(negedge clk); req = 1; req_len = ext.size(); req_part = 2'(q);
    @(negedge clk); req = 0; req_part = 2'(q + 1);
    while (!done && cyc < 20000) begin
      if (recovering && rec_start < 0 && icap_write) rec_start = cyc;
      if (recovering && icap_write && icap_last && !icap_busy) rec_end = cyc;
      @(negedge clk); cyc++;
    end
    checks++;
    if (result !== want_res) begin
      failures++; $display("partition %0d, seed %0d, mode %0d: result %s want %s",
                           q, seed, mode, result.name(), want_res.name());
    end
    case (result)
      RES_OK:        n_ok++;
      RES_RECOVERED: n_recovered++;
      RES_FAILED:    n_failed++;
      default: ;
    endcase
    want = ext;
    if (mode == 1) foreach (bb[i]) want.push_back(bb[i]);
    if (mode != 2) begin
      checks++;
      if (u_icap.log.size() - log0 != want.size()) begin
        failures++; $display("ICAP got %0d words, want %0d", u_icap.log.size() - log0, want.size());
      end else foreach (want[i]) begin
        checks++;
        if (u_icap.log[log0 + i] !== want[i]) begin
          failures++; $display("ICAP word %0d: %h want %h", i, u_icap.log[log0 + i], want[i]);
        end
      end
    end else begin
      write_packet(bad_addr, img_of[q][bad_addr - 4 - q * SLOT]);
    end
    // recovery time with the ICAP never busy: decoder model plus start-up
    if (mode == 1 && u_icap.busy_pct == 0) begin
      checks++; n_rate_checked++;
      if (rec_end - rec_start + 1 > int'(decode_cycles(syms_of[q])) + LATENCY) begin
        failures++; $display("black box of %0d words took %0d clocks, model %0d",
                             bb.size(), rec_end - rec_start + 1, decode_cycles(syms_of[q]));
      end
    end
    repeat (4) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    u_icap.busy_pct = 0;
    // 50 black boxes: sizes 1..5 frames, 10 placements each, stored in turn
    // into partitions 0..3; each load is followed by requests to the freshly
    // loaded partition and to one loaded earlier.
    for (int k = 0; k < 50; k++) begin
      int p, q;
      p = k % 4;
      load_partition(p, gen_bitstream(1 + k / 10, 1000 * (1 + k / 10) + k % 10));
      q = loaded[(k + 2) % 4] ? (k + 2) % 4 : p;
      scenario(p, k, 0);
      scenario(p, k, 1);
      scenario(q, k + 7, 1);
    end
    u_icap.busy_pct = 25;
    for (int k = 0; k < 24; k++) scenario(k % 4, 100 + k, 1 + (k % 2));
    $display("results: ok=%0d recovered=%0d failed=%0d", n_ok, n_recovered, n_failed);
    $display("events: icap busy stalls=%0d ext gaps=%0d packet advances=%0d zero-run clocks=%0d",
             u_icap.busy_stalls, n_ext_gap, n_split, n_run_clk);
    $display("average compression rate %0d%% over %0d black boxes", rate_sum / rate_cnt, rate_cnt);
    checks++; if (n_ok == 0)        begin failures++; $display("no clean load"); end
    checks++; if (n_recovered == 0) begin failures++; $display("no recovery"); end
    checks++; if (n_failed == 0)    begin failures++; $display("no failed recovery"); end
    checks++; if (u_icap.busy_stalls == 0) begin failures++; $display("no ICAP stall"); end
    checks++; if (n_ext_gap == 0)   begin failures++; $display("no external gap"); end
    checks++; if (n_split == 0)     begin failures++; $display("no packet advance"); end
    checks++; if (n_run_clk == 0)   begin failures++; $display("no zero run"); end
    checks++; if (n_rate_checked == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
