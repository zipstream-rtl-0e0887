// tb_zs_decompressor: builds black-box-like bitstreams of 1 to 5 frames for
// four partitions, compresses them with the reference model, loads the
// directory and images into the block RAM and each partition's LUT ROM page
// and group table, decodes each partition's image, and checks every decompressed word and the last-word
// flag. Without back-pressure the clock count from start to the last word
// must stay within the run-length decoder's own count plus a fixed start-up
// latency; a second pass adds random back-pressure.
module tb_zs_decompressor;
  import zs_pkg::*;
  import zs_tb_pkg::*;
  localparam int unsigned LATENCY = 12; // directory, seek, two header packets, window fill
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, error;
  logic bram_re;
  logic [9:0] bram_raddr;
  logic [PKT_W-1:0] bram_rdata;
  logic [WORD_W-1:0] word;
  logic word_valid, word_last, word_ready = 0;
  logic lut_we = 0, grp_we = 0, gmax_we = 0;
  logic [1:0] part = '0, tbl_part = '0;
  logic [LUT_AW-1:0] lut_waddr = '0;
  lut_entry_t lut_wdata = '0;
  logic [GRP_W-1:0] grp_idx = '0, gmax = '0;
  group_desc_t grp_desc = '0;
  logic split, run_active;
  logic bram_we = 0;
  logic [9:0] bram_waddr = '0;
  logic [PKT_W-1:0] bram_wdata = '0;
  int checks = 0, failures = 0;

  zs_bitstream_bram u_bram (.clk, .we (bram_we), .waddr (bram_waddr), .wdata (bram_wdata),
                            .re (bram_re), .raddr (bram_raddr), .rdata (bram_rdata));

  zs_decompressor dut (.clk, .rst_n, .start, .part, .tbl_part, .busy, .done, .error, .bram_re, .bram_raddr, .bram_rdata,
                       .word, .word_valid, .word_last, .word_ready,
                       .lut_we, .lut_waddr, .lut_wdata, .grp_we, .grp_idx, .grp_desc,
                       .gmax_we, .gmax, .split, .run_active);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_q_t bb [4];
  sym_q_t  bb_syms [4];

  // Four partitions' black boxes of the given frame counts: directory in
  // packets 0..3, images one after the other from packet 4.
  task automatic load_all(int f0, int f1, int f2, int f3, int seed);
    int frames [4] = '{f0, f1, f2, f3};
    int addr = 4;
    for (int p = 0; p < 4; p++) begin
      table_t t;
      pkt_q_t img;
      int unsigned nbits;
      bb[p] = gen_bitstream(frames[p], 17 * frames[p] + 3 + seed + p);
      t.codes = shape_growing(t.gmax);
      checks++;
      if (!compress(bb[p], t, img, bb_syms[p], nbits)) begin failures++; $display("alphabet too large"); end
      $display("partition %0d, %0d frames: %0d words, %0d packets (%0d%%), %0d symbols", p,
               frames[p], bb[p].size(), img.size(), 100 * img.size() / (2 * bb[p].size()), bb_syms[p].size());
      @(negedge clk); bram_we = 1; bram_waddr = 10'(p); bram_wdata = 16'(addr);
      foreach (img[i]) begin
        @(negedge clk); bram_we = 1; bram_waddr = 10'(addr + i); bram_wdata = img[i];
      end
      addr += img.size();
      @(negedge clk); bram_we = 0; tbl_part = 2'(p);
      for (int a = 0; a < LUT_DEPTH; a++) begin
        @(negedge clk); lut_we = 1; lut_waddr = LUT_AW'(a); lut_wdata = t.lut[a];
      end
      @(negedge clk); lut_we = 0;
      for (int g = 0; g < NGROUPS; g++) begin
        @(negedge clk); grp_we = 1; grp_idx = GRP_W'(g); grp_desc = t.groups[g];
      end
      @(negedge clk); grp_we = 0; gmax_we = 1; gmax = GRP_W'(t.gmax);
      @(negedge clk); gmax_we = 0;
    end
  endtask

  task automatic run(int p, bit stalls);
    word_q_t w = bb[p];
    sym_q_t syms = bb_syms[p];
    int wi = 0, cyc = 0;
    bit seen_done = 0;
    @(negedge clk); start = 1; part = 2'(p);
    @(negedge clk); start = 0; part = 2'(p + 1);
    while (!seen_done && cyc < 20000) begin
      word_ready = stalls ? (($urandom % 4) != 0) : 1'b1;
      #1;
      if (word_valid && word_ready) begin
        checks++;
        if (wi >= w.size() || word !== w[wi]) begin
          failures++; $display("part %0d word %0d: got %h want %h", p, wi, word, (wi < w.size()) ? w[wi] : 0);
        end
        checks++;
        if (word_last !== (wi == w.size() - 1)) begin failures++; $display("word_last wrong at %0d", wi); end
        wi++;
        if (wi == w.size() && !stalls) begin
          checks++;
          if (cyc + 1 > decode_cycles(syms) + LATENCY || cyc + 1 < decode_cycles(syms)) begin
            failures++; $display("took %0d clocks, RLE model %0d", cyc + 1, decode_cycles(syms));
          end
        end
      end
      @(negedge clk);
      if (done) seen_done = 1;
      cyc++;
    end
    checks++;
    if (wi != w.size() || busy || error) begin
      failures++; $display("%0d of %0d words, busy %b error %b", wi, w.size(), busy, error);
    end
    word_ready = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    load_all(1, 2, 3, 4, 0);
    for (int p = 0; p < 4; p++) run(p, 0);
    run(3, 1);
    run(0, 1);
    load_all(5, 5, 2, 1, 100);
    for (int p = 3; p >= 0; p--) run(p, p[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
