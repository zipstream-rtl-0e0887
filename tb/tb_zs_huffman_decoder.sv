// tb_zs_huffman_decoder: encodes random symbol streams with the 15-symbol
// example code and with the 95-symbol growing code, feeds the packets with
// random gaps and random output back-pressure, and compares every decoded
// symbol with the one encoded. A final run with no gaps checks the rate of one
// code word per clock. Code words split across packets are counted.
module tb_zs_huffman_decoder;
  import zs_pkg::*;
  import zs_tb_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [PKT_W-1:0] pkt_data;
  logic pkt_valid = 0, pkt_ready;
  rle_sym_t sym;
  logic sym_valid, sym_ready = 0;
  logic lut_we = 0, grp_we = 0, gmax_we = 0;
  logic [1:0] part = '0, tbl_part = '0;
  logic [LUT_AW-1:0] lut_waddr = '0;
  lut_entry_t lut_wdata = '0;
  logic [GRP_W-1:0] grp_idx = '0, gmax = '0;
  group_desc_t grp_desc = '0;
  logic split;
  int checks = 0, failures = 0, splits = 0;

  pkt_q_t pkts;
  int     pi = 0;
  assign pkt_data = (pi < pkts.size()) ? pkts[pi] : 16'h0;

  zs_huffman_decoder dut (.clk, .rst_n, .clear, .part, .tbl_part, .pkt_data, .pkt_valid, .pkt_ready,
                          .sym, .sym_valid, .sym_ready,
                          .lut_we, .lut_waddr, .lut_wdata, .grp_we, .grp_idx, .grp_desc,
                          .gmax_we, .gmax, .code_err (), .split);

  always #5 clk = ~clk;
  always @(posedge clk) if (split && sym_valid && sym_ready) splits++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(ref table_t t);
    for (int a = 0; a < LUT_DEPTH; a++) begin
      @(negedge clk); lut_we = 1; lut_waddr = LUT_AW'(a); lut_wdata = t.lut[a];
    end
    @(negedge clk); lut_we = 0;
    for (int g = 0; g < NGROUPS; g++) begin
      @(negedge clk); grp_we = 1; grp_idx = GRP_W'(g); grp_desc = t.groups[g];
    end
    @(negedge clk); grp_we = 0; gmax_we = 1; gmax = GRP_W'(t.gmax);
    @(negedge clk); gmax_we = 0;
  endtask

  // n random symbols; returns the cycles from the first decoded symbol to the last
  // p: partition page used; the other pages keep what earlier runs loaded
  task automatic run(int p, bit growing, int n, bit gaps, output int cycles);
    table_t t;
    sym_q_t alphabet, stream;
    logic bitq [$];
    int got = 0, first_cyc = -1, cyc = 0;
    if (growing) t.codes = shape_growing(t.gmax); else t.codes = shape_example(t.gmax);
    for (int r = 0; r < t.codes.size(); r++) alphabet.push_back(9'((r * 97 + 5) % 512));
    build_tables(t, alphabet);
    tbl_part = 2'(p);
    load(t);
    tbl_part = 2'(p + 1);   // writes must not leak into the page in use
    part = 2'(p);
    pkts.delete();
    for (int i = 0; i < n; i++) begin
      int r;
      r = $urandom % alphabet.size();
      stream.push_back(alphabet[r]);
      for (int b = int'(t.codes[r].len) - 1; b >= 0; b--) bitq.push_back(t.codes[r].bits[b]);
    end
    while (bitq.size() % 16 != 0) bitq.push_back(1'b0);
    for (int i = 0; i < bitq.size(); i += 16) begin
      logic [15:0] p;
      for (int b = 0; b < 16; b++) p[15 - b] = bitq[i + b];
      pkts.push_back(p);
    end
    pkts.push_back(16'h0); pkts.push_back(16'h0);
    @(negedge clk); clear = 1; pi = 0;
    @(negedge clk); clear = 0;
    while (got < n) begin
      logic take, accept;
      pkt_valid = gaps ? (($urandom % 4) != 0) : 1'b1;
      sym_ready = gaps ? (($urandom % 3) != 0) : 1'b1;
      #1;
      take   = pkt_valid && pkt_ready;
      accept = sym_valid && sym_ready;
      if (accept) begin
        checks++;
        if (sym !== rle_sym_t'(stream[got])) begin
          failures++;
          $display("symbol %0d: got %h want %h", got, sym, stream[got]);
        end
        if (first_cyc < 0) first_cyc = cyc;
        got++;
      end
      @(posedge clk);
      @(negedge clk);
      if (take && pi < pkts.size() - 1) pi++;
      cyc++;
      if (cyc > 20 * n + 100) break;
    end
    cycles = cyc - first_cyc;
    checks++;
    if (got != n) begin failures++; $display("decoded %0d of %0d", got, n); end
    pkt_valid = 0; sym_ready = 0;
  endtask

  initial begin
    int c;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(0, 0, 400, 1, c);
    run(1, 1, 400, 1, c);
    run(2, 1, 400, 0, c);
    checks++;
    if (c > 400 + 2) begin failures++; $display("400 codes took %0d clocks", c); end
    checks++;
    if (splits == 0) begin failures++; $display("no code word crossed a packet"); end
    $display("splits=%0d", splits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
